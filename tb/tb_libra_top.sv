// tb_libra_top: end-to-end run of the LIBRA with all parameters at their
// defaults. A host loads a program written in the style of compiled WAM code
// and its data, starts the processor, waits for the closing self-loop, and
// then checks registers and memory against values worked out by hand.
// The program exercises every mechanism of the design at least once and the
// bench counts them: dereference stalls (exact count), operand forwarding,
// instructions squashed by a false condition (trail1/trail2/bound1/ovf),
// taken branches, each partial unify action (dereference branch, bind junior
// to senior, bind A to B, bind B to A, fail-if-different, fail, branch to
// pre-load address), trail-check scoreboard sets, the sticky overflow,
// push/pop in both directions, push-and-load-reference, call/return and
// switch on type, and a clause template run three times with its holes
// filled from a difference stream.
module tb_libra_top;
  import libra_pkg::*;
  import libra_asm_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  logic host_en = 0, host_we = 0, host_isel = 0;
  logic [15:0] host_addr = 0;
  word_t host_wdata = 0, host_rdata;
  logic [PS_W-1:0] ps; pc_t e_pc;
  logic self_loop, ev_retire, ev_squash, ev_stall, ev_redirect, ev_fwd, ev_unify, ev_trail_set, ev_ovf, ev_hole;
  logic [2:0] ev_unify_act;

  libra_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cycles = 0, n_retire = 0, n_squash = 0, n_stall = 0, n_redirect = 0, n_fwd = 0, n_trail = 0, n_ovf = 0, n_hole = 0;
  int n_act [8];

  localparam logic [4:0] H = 20, E = 21, B = 22, TR = 23, HB = 24, EB = 25, SLIM = 26, TLIM = 27;
  localparam logic [2:0] TB_ = 0, TU = 1, TI = 2, TS = 3, TL1 = 4, TL2 = 5;

  iw_t prog [logic [15:0]];

  task automatic hw(logic isel, logic [15:0] a, word_t d);
    @(negedge clk); host_en = 1; host_we = 1; host_isel = isel; host_addr = a; host_wdata = d;
    @(posedge clk); #1 host_en = 0; host_we = 0;
  endtask
  task automatic hr(logic isel, logic [15:0] a, output word_t d);
    @(negedge clk); host_en = 1; host_we = 0; host_isel = isel; host_addr = a;
    @(posedge clk); #1 host_en = 0; d = host_rdata;
  endtask
  task automatic chk(logic ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic word_t w(logic [2:0] t, int v); return mkword(t, 2'b00, val_t'(v)); endfunction

  always @(posedge clk) if (run) begin
    n_cycles++;
    if (ev_retire) n_retire++;
    if (ev_squash) n_squash++;
    if (ev_stall) n_stall++;
    if (ev_redirect) n_redirect++;
    if (ev_fwd) n_fwd++;
    if (ev_trail_set) n_trail++;
    if (ev_ovf) n_ovf++;
    if (ev_hole) n_hole++;
    if (ev_unify) n_act[ev_unify_act]++;
  end

  initial begin
    word_t d;
    foreach (n_act[i]) n_act[i] = 0;
    // ---- program
    prog[0] = movi(H, TI, 100);    prog[1] = movi(E, TI, 2000);  prog[2] = movi(B, TI, 3000);
    prog[3] = movi(TR, TI, 4000);  prog[4] = movi(HB, TI, 150);  prog[5] = movi(EB, TI, 2500);
    prog[6] = movi(SLIM, TI, 1000); prog[7] = movi(TLIM, TI, 4005);
    prog[8] = movi(1, TB_, 50);
    prog[9] = drf(1, 2);                         // 3 links: stall 3
    prog[10] = movi(3, TI, 7);
    prog[11] = cmp(2, 3);
    prog[12] = unify(2, 3, 0, 0);                // bind A to B
    prog[13] = pushp(TR, 2, CC_TRAIL1);          // executes
    prog[14] = pushp(TR, 3, CC_TRAIL2);          // squashed
    prog[15] = drf(1, 4);                        // 3 links again
    prog[16] = cmp(4, 3);
    prog[17] = unify(4, 3, 0, 0);                // fail if different: equal
    prog[18] = pushldref(H, TU, H, TB_, 5);      // put_variable
    prog[19] = pushldref(H, TU, H, TB_, 6);
    prog[20] = drf(5, 7);                        // 1 link
    prog[21] = drf(6, 8);                        // 1 link
    prog[22] = cmp(7, 8);
    prog[23] = unify(7, 8, 0, 0);                // bind junior to senior
    prog[24] = pushp(TR, 7, CC_TRAIL1);          // squashed
    prog[25] = pushp(TR, 8, CC_TRAIL2);          // executes
    prog[26] = movi(9, TL1, 200);
    prog[27] = movi(10, TL2, 300);
    prog[28] = cmp(9, 10);
    prog[29] = unify(9, 10, 0, 16'd40);          // branch to pre-load address
    prog[30] = movi(11, TI, 999);                // never executed
    prog[31] = movi(11, TI, 998);
    prog[40] = call_(29'd80);
    prog[41] = movi(13, TS, 123);
    prog[42] = cmp(13, 0);
    prog[43] = switch_(9'd50, 9'd70, 9'd71);     // symbol -> 50
    prog[44] = movi(14, TI, 1);                  // never executed
    prog[50] = pushp(TR, 3); prog[51] = pushp(TR, 3); prog[52] = pushp(TR, 3);  // TR reaches TLIM
    prog[53] = movi(16, TI, 5);
    prog[54] = movi(17, TS, 5);
    prog[55] = movi(15, TI, 77, CC_OVF);         // executes: sticky overflow
    prog[56] = movi(19, TB_, 60);
    prog[57] = goto_(29'd59);
    prog[58] = ld(19, 0, 19, CC_BOUND1);         // loop: dereference step
    prog[59] = cmp(19, 3);                       // enter
    prog[60] = unify(19, 3, 3'd2, 0);            // bound -> back to 58, then equal
    prog[61] = st(H, 0, 3);
    prog[62] = ld(H, 0, 18);
    prog[63] = add(18, 18, 18);                  // load result forwarded
    prog[64] = popm(TR, 10);                     // pre-decrement pop
    prog[65] = cmp(3, 7);
    prog[66] = unify(3, 7, 0, 0);                // bind B to A
    prog[67] = pushp(TR, 7, CC_TRAIL2);          // executes
    prog[68] = cmp(16, 17);
    prog[69] = unify(16, 17, 0, 0);              // fail -> 0x400
    prog[70] = movi(14, TI, 2);                  // never executed
    prog[80] = movi(12, TI, 5);
    prog[81] = ret_(2'd0);
    prog[16'h400] = movi(1, TI, 16'h55);
    // template with two holes, run once per clause; the difference stream
    // holds two instructions per clause
    prog[16'h401] = lddpc(29'h480);
    prog[16'h402] = movi(17, TI, 0);
    prog[16'h403] = movi(16, TI, 3);                          // three clauses
    prog[16'h404] = hole();                                   // hole 1
    prog[16'h405] = add(17, 9, 17);                           // acc += r9
    prog[16'h406] = hole();                                   // hole 2
    prog[16'h407] = enc_imm(0, 3'd1, 1'b1, 3'd2, 16, TI, 16, 16'd1);  // SUB sc r16, 1, r16
    prog[16'h408] = if_(5'(CC_NE), 21'h404);
    prog[16'h409] = goto_(29'h409);
    prog[16'h480] = movi(9, TI, 1);   prog[16'h481] = add(17, 17, 17);
    prog[16'h482] = movi(9, TI, 10);  prog[16'h483] = add(17, 9, 17);
    prog[16'h484] = movi(9, TI, 100); prog[16'h485] = add(17, 17, 17);
    prog[16'h486] = movi(17, TI, 999);                        // never reached

    repeat (3) @(posedge clk); rst_n = 1;
    foreach (prog[a]) hw(1'b1, a, prog[a]);
    hw(0, 50, w(TB_, 51)); hw(0, 51, w(TB_, 52)); hw(0, 52, w(TU, 52)); hw(0, 60, w(TI, 7));
    for (int a = 100; a < 103; a++) hw(0, 16'(a), '0);
    for (int a = 4000; a < 4006; a++) hw(0, 16'(a), '0);

    @(negedge clk); run = 1;
    while (!self_loop) @(posedge clk);
    repeat (4) @(posedge clk); #1;

    // ---- registers
    chk(dut.u_core.u_rf.r[1]  == w(TI, 16'h55), "r1 fail handler ran");
    chk(dut.u_core.u_rf.r[2]  == w(TU, 52),  "r2 deref of 3-link chain");
    chk(dut.u_core.u_rf.r[4]  == w(TI, 7),   "r4 deref after binding");
    chk(dut.u_core.u_rf.r[5]  == w(TB_, 100), "r5 ldref");
    chk(dut.u_core.u_rf.r[6]  == w(TB_, 101), "r6 ldref");
    chk(dut.u_core.u_rf.r[7]  == w(TU, 100), "r7");
    chk(dut.u_core.u_rf.r[8]  == w(TU, 101), "r8");
    chk(dut.u_core.u_rf.r[10] == w(TI, 7),   "r10 pop");
    chk(dut.u_core.u_rf.r[11] == '0,         "r11 skipped by unify branch");
    chk(dut.u_core.u_rf.r[12] == w(TI, 5),   "r12 subroutine");
    chk(dut.u_core.u_rf.r[14] == '0,         "r14 skipped by switch/fail");
    chk(dut.u_core.u_rf.r[15] == w(TI, 77),  "r15 if ovf");
    chk(dut.u_core.u_rf.r[18] == w(TI, 14),  "r18 load + add");
    chk(dut.u_core.u_rf.r[19] == w(TI, 7),   "r19 deref loop");
    chk(dut.u_core.u_rf.r[17] == w(TI, 244), "r17 template + difference stream");
    chk(dut.u_core.u_rf.r[16] == w(TI, 0),   "r16 template loop count");
    chk(dut.u_core.tp_dpc == 29'h486,        "difference PC after three clauses");
    chk(dut.u_core.u_rf.r[H]  == w(TI, 102), "H");
    chk(dut.u_core.u_rf.r[TR] == w(TI, 4005), "TR");
    chk(dut.u_core.u_rf.r[28] == w(TI, 41),  "CP0");

    // ---- counts
    chk(n_stall == 8, $sformatf("dereference stall cycles %0d, expected 8", n_stall));
    chk(n_act[U_DEREF] == 1 && n_act[U_BIND_JS] == 1 && n_act[U_BIND_AB] == 1 && n_act[U_BIND_BA] == 1 &&
        n_act[U_FAIL_NE] == 2 && n_act[U_FAIL] == 1 && n_act[U_PRELOAD] == 1, "partial unify action counts");
    chk(n_squash == 2, $sformatf("conditional squash %0d, expected 2", n_squash));
    chk(n_redirect >= 6, "taken branches");
    chk(n_fwd > 0, "forwarding");
    chk(n_trail == 3, $sformatf("trail-check bits set %0d, expected 3", n_trail));
    chk(n_ovf == 1 && ps[PS_OVF], "sticky overflow");
    chk(n_hole == 6, $sformatf("template holes filled %0d, expected 6", n_hole));

    run = 0;
    // ---- memory
    hr(0, 52, d);   chk(d == w(TI, 7),   "bind A to B wrote mem[52]");
    hr(0, 100, d);  chk(d == w(TI, 7),   "bind B to A wrote mem[100]");
    hr(0, 101, d);  chk(d == w(TB_, 100), "junior bound to senior");
    hr(0, 102, d);  chk(d == w(TI, 7),   "store");
    hr(0, 4000, d); chk(d == w(TU, 52),  "trail entry 0");
    hr(0, 4001, d); chk(d == w(TU, 101), "trail entry 1");
    hr(0, 4003, d); chk(d == w(TI, 7),   "trail area push");
    hr(0, 4004, d); chk(d == w(TU, 100), "trail entry after pop");

    $display("cycles=%0d retired=%0d squashed=%0d stall=%0d branches=%0d forwards=%0d trail_sets=%0d holes=%0d",
             n_cycles, n_retire, n_squash, n_stall, n_redirect, n_fwd, n_trail, n_hole);
    $display("unify actions: deref=%0d js=%0d ab=%0d ba=%0d fail_ne=%0d fail=%0d preload=%0d",
             n_act[0], n_act[1], n_act[2], n_act[3], n_act[4], n_act[5], n_act[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
