// tb_wam_macros: runs WAM instructions, macro-expanded into LIBRA code, on the
// full-size processor (all parameters at their defaults).
// The program unifies the head p(f(X, a), [X | 9]) against the arguments
// A1 = a reference to an old unbound variable and A2 = the list [5 | 9]:
//   get_structure f/2, A1   write mode: the variable is bound to a new
//                           structure on the heap and trailed
//   unify_variable X3       write mode: push-and-load-reference
//   unify_constant a        write mode: push of a tagged immediate
//   get_list A2             read mode through SWITCH on the type tag
//   unify_value X3          read mode: pop-and-dereference, dereference,
//                           compare, partial unify (binds X to 5), trail
//   unify_constant 9        read mode: partial unify, fail-if-different
// and then builds a choice point (try_me_else) and drops it (trust_me).
// Before that, six WAM instructions that expand to one LIBRA instruction
// each (put_constant, put_list, get_variable, put_structure, unify_variable
// and unify_constant in write mode) are timed: they must take six cycles.
// The code follows the macro expansions of the architecture; the encodings,
// register numbers and the hand-worked expected heap, trail and choice-point
// contents are this bench's. A failure would jump to the failure vector,
// which marks r19. The bench also prints the cycle count of the run.
module tb_wam_macros;
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

  int checks = 0, failures = 0, n_cycles = 0, n_retire = 0, n_unify = 0, n_seg = 0;
  int seg_lo = 0, seg_hi = -1;
  always @(posedge clk) if (run) begin
    n_cycles++;
    if (dut.u_core.e_valid && int'(e_pc) >= seg_lo && int'(e_pc) <= seg_hi) n_seg++;
    if (ev_retire) n_retire++;
    if (ev_unify) n_unify++;
  end

  localparam logic [4:0] H = 20, E = 21, B = 22, TR = 23, HB = 24, EB = 25, SLIM = 26, TLIM = 27;
  localparam logic [2:0] TB_ = 0, TU = 1, TI = 2, TS = 3, TL1 = 4, TS1 = 6;

  iw_t prog [logic [15:0]];

  function automatic iw_t st_t(logic [4:0] a, logic [15:0] off, logic [2:0] t3, logic [4:0] rs,
                               logic se = 0, logic [3:0] c = 0);       // ST a, off, t3:rs
    return enc_imm(c, 3'd4, se, 3'd5, a, t3, rs, off);
  endfunction
  function automatic iw_t pushimm(logic [4:0] p, logic [2:0] t3, logic [15:0] v);  // PUSH+ p, t3:imm16
    return enc_imm(4'd0, 3'd6, 1'b0, 3'd4, p, t3, 5'd0, v);
  endfunction
  function automatic iw_t popdrf(logic [4:0] p, logic [4:0] rd);       // POP+ & DRF p, rd
    return enc_reg(4'd0, 3'd6, 1'b0, 3'd1, p, 5'd0, rd);
  endfunction

  task automatic hw(logic isel, logic [15:0] a, word_t d);
    @(negedge clk); host_en = 1; host_we = 1; host_isel = isel; host_addr = a; host_wdata = d;
    @(posedge clk); #1 host_en = 0; host_we = 0;
  endtask
  task automatic hr(logic [15:0] a, output word_t d);
    @(negedge clk); host_en = 1; host_we = 0; host_isel = 0; host_addr = a;
    @(posedge clk); #1 host_en = 0; d = host_rdata;
  endtask
  task automatic chk(logic ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic word_t w(logic [2:0] t, int v); return mkword(t, 2'b00, val_t'(v)); endfunction

  initial begin
    word_t d;
    int pc;
    pc = 0;
    // machine state
    prog[pc++] = movi(H, TI, 100);   prog[pc++] = movi(E, TI, 2000);  prog[pc++] = movi(B, TI, 3000);
    prog[pc++] = movi(TR, TI, 4000); prog[pc++] = movi(HB, TI, 150);  prog[pc++] = movi(EB, TI, 2500);
    prog[pc++] = movi(SLIM, TI, 1000); prog[pc++] = movi(TLIM, TI, 4090);
    prog[pc++] = movi(1, TB_, 50);   // A1 = reference to the variable at 50
    prog[pc++] = movi(2, TL1, 60);   // A2 = list cell at 60
    // six WAM instructions of one LIBRA instruction each (timed)
    seg_lo = pc;
    prog[pc++] = movi(4, TS, 11);                                     // put_constant 11, A4
    prog[pc++] = enc_imm(4'd0, 3'd1, 1'b0, 3'd0, H, TL1, 5, 16'd0);    // put_list A5
    prog[pc++] = add(4, 0, 6);                                        // get_variable X6, A4
    prog[pc++] = enc_imm(4'd0, 3'd6, 1'b0, 3'd6, H, TS1, 7, {TS, 13'd21}); // put_structure g/1, A7
    prog[pc++] = pushldref(H, TU, H, TB_, 8);                         // unify_variable X8 (write)
    prog[pc++] = pushimm(H, TS, 16'd5);                               // unify_constant 5 (write)
    seg_hi = pc - 1;
    prog[pc++] = movi(H, TI, 100);   // heap back to 100 for the rest
    // get_structure f/2, A1
    prog[pc++] = drf(1, 10, 1'b1);                          // drf sc A1, T1
    prog[pc++] = switch_(9'd500, 9'd500, 9'd500);           // constant/list/struct: not here
    prog[pc++] = st_t(10, 0, TS1, H, 1'b1, CC_VAR);         // if var st sc T1, 0, struc:H
    prog[pc++] = pushp(TR, 10, CC_TRAIL1);                  // if trail1 push+ TR, T1
    prog[pc++] = pushimm(H, TS, 16'd7);                     // push+ H, con:f/2
    // unify_variable X3 (write mode)
    prog[pc++] = pushldref(H, TU, H, TB_, 3);               // push+&ldref H, unb:H, bnd:X3
    // unify_constant a (write mode)
    prog[pc++] = pushimm(H, TS, 16'd3);                     // push+ H, con:a
    // get_list A2
    prog[pc++] = drf(2, 11, 1'b1);                          // drf sc A2, T1
    prog[pc++] = switch_(9'd500, 9'd40, 9'd500);            // list -> read mode at 40
    prog[pc++] = goto_(29'd500);                            // (write mode not exercised)
    pc = 40;
    // unify_value X3 (read mode), S = r11
    prog[pc++] = popdrf(11, 13);                            // pop+&drf S, T1
    prog[pc++] = drf(3, 14);                                // drf X3, T2
    prog[pc++] = cmp(13, 14);                               // sub sc T1, T2, r0
    prog[pc++] = unify(13, 14, 3'd0, 16'd0);                // unify sc T1, T2
    prog[pc++] = pushp(TR, 13, CC_TRAIL1);                  // if trail1 push+ TR, T1
    prog[pc++] = pushp(TR, 14, CC_TRAIL2);                  // if trail2 push+ TR, T2
    // unify_constant 9 (read mode)
    prog[pc++] = popdrf(11, 13);                            // pop+&drf S, T1
    prog[pc++] = movi(14, TS, 9);                           // add r0, con:9, T2
    prog[pc++] = cmp(13, 14);
    prog[pc++] = unify(13, 14, 3'd0, 16'd0);
    prog[pc++] = pushp(TR, 13, CC_TRAIL1);
    // try_me_else L (shortened: two argument registers)
    prog[pc++] = pushp(B, 1);  prog[pc++] = pushp(B, 2);  prog[pc++] = pushp(B, 28);
    prog[pc++] = pushp(B, TR); prog[pc++] = pushp(B, E);  prog[pc++] = pushp(B, H);
    prog[pc++] = pushimm(B, TI, 16'd300);                   // alternative clause address
    prog[pc++] = add(H, 0, HB);                             // HB <- H
    // trust_me: drop the choice point, restore HB from it
    prog[pc++] = enc_imm(4'd0, 3'd1, 1'b0, 3'd2, B, TI, B, 16'd7);   // sub B, 7, B
    prog[pc++] = ld(B, 16'd5, HB);                          // HB <- saved H
    prog[pc] = goto_(29'(pc)); pc++;
    prog[500] = goto_(29'h400);
    prog[16'h400] = movi(19, TI, 16'hBAD);
    prog[16'h401] = goto_(29'h401);

    repeat (3) @(posedge clk); rst_n = 1;
    foreach (prog[a]) hw(1'b1, a, prog[a]);
    hw(0, 50, w(TU, 50));                                   // old unbound variable
    hw(0, 60, w(TI, 5)); hw(0, 61, w(TS, 9));               // list [5 | 9]
    for (int a = 100; a < 104; a++) hw(0, 16'(a), '0);
    for (int a = 3000; a < 3008; a++) hw(0, 16'(a), '0);
    for (int a = 4000; a < 4003; a++) hw(0, 16'(a), '0);

    @(negedge clk); run = 1;
    while (!self_loop) @(posedge clk);
    repeat (4) @(posedge clk); #1;

    chk(dut.u_core.u_rf.r[19] == '0,           "no failure");
    chk(e_pc != 29'h401,                        "ended at the program end");
    chk(dut.u_core.u_rf.r[3]  == w(TB_, 101),  "X3 = reference to the new heap variable");
    chk(dut.u_core.u_rf.r[10] == w(TU, 50),    "T1 = dereferenced A1");
    chk(dut.u_core.u_rf.r[13] == w(TS, 9),     "last list element");
    chk(w_val(dut.u_core.u_rf.r[11]) == 62,    "S advanced over the list cell");
    chk(w_val(dut.u_core.u_rf.r[H]) == 103,    "H");
    chk(w_val(dut.u_core.u_rf.r[TR]) == 4002,  "TR: two trail entries");
    chk(w_val(dut.u_core.u_rf.r[B]) == 3000,   "B after trust_me");
    chk(dut.u_core.u_rf.r[HB] == w(TI, 103),   "HB restored from the choice point");
    chk(n_unify == 2,                           "two partial unify instructions");
    chk(n_seg == 6, $sformatf("six one-instruction WAM operations took %0d cycles", n_seg));
    chk(dut.u_core.u_rf.r[4] == w(TS, 11),     "put_constant");
    chk(dut.u_core.u_rf.r[5] == w(TL1, 100),   "put_list");
    chk(dut.u_core.u_rf.r[6] == w(TS, 11),     "get_variable");
    chk(dut.u_core.u_rf.r[7] == w(TS1, 100),   "put_structure");
    chk(dut.u_core.u_rf.r[8] == w(TB_, 101),   "unify_variable (write)");
    run = 0;
    hr(50, d);   chk(d == w(TS1, 100), "A1 variable bound to f/2 structure");
    hr(100, d);  chk(d == w(TS, 7),    "functor cell");
    hr(101, d);  chk(d == w(TI, 5),    "X bound to 5 by unify_value");
    hr(102, d);  chk(d == w(TS, 3),    "constant a");
    hr(4000, d); chk(d == w(TU, 50),   "trail entry for the A1 variable");
    hr(4001, d); chk(d == w(TU, 101),  "trail entry for X");
    hr(4002, d); chk(d == '0,          "no third trail entry");
    hr(3000, d); chk(d == w(TB_, 50),  "choice point: A1");
    hr(3001, d); chk(d == w(TL1, 60),  "choice point: A2");
    hr(3003, d); chk(d == w(TI, 4002), "choice point: TR");
    hr(3004, d); chk(d == w(TI, 2000), "choice point: E");
    hr(3005, d); chk(d == w(TI, 103),  "choice point: H");
    hr(3006, d); chk(d == w(TI, 300),  "choice point: alternative");

    $display("cycles=%0d retired=%0d", n_cycles, n_retire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
