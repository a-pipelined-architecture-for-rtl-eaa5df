// tb_libra_core: runs the LIBRA pipeline against behavioural memories with a
// program covering the instructions the end-to-end test does not: carry and
// borrow flags, long immediates built with LDHI/LDGC, shifts, SET/CLEAR and
// IF on a status bit, SAVPS/RESTORPS, pre-decrement push, PUSH & LD,
// DRFMEM and POP & DRF, IF on a condition, INDEX on a tag and TRAPCALL/RET.
// It also checks the single-cycle claim: every cycle of the run is accounted
// for by a retired or squashed instruction, a dereference stall cycle, or one
// of the two bubbles after each taken branch (plus two at start-up; the
// closing self-loop branch is counted in the cycle it is taken, before its bubbles).
module tb_libra_core;
  import libra_pkg::*;
  import libra_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic imem_en, dmem_en, dmem_we;
  logic [13:0] imem_addr, dmem_addr;
  word_t imem_rdata, dmem_rdata, dmem_wdata;
  logic [PS_W-1:0] ps_o; pc_t e_pc_o;
  logic self_loop, ev_retire, ev_squash, ev_stall, ev_redirect, ev_fwd, ev_unify, ev_trail_set, ev_ovf, ev_hole;
  uact_e ev_unify_act;

  libra_core dut (.*);
  always #5 clk = ~clk;

  word_t imem [16384];
  word_t dmem [16384];
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= imem[imem_addr];
    if (dmem_en) begin
      if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
      else dmem_rdata <= dmem[dmem_addr];
    end
  end

  int checks = 0, failures = 0;
  int n_cycles = 0, n_retire = 0, n_squash = 0, n_stall = 0, n_redirect = 0, n_fwd = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    n_retire += int'(ev_retire); n_squash += int'(ev_squash); n_stall += int'(ev_stall);
    n_redirect += int'(ev_redirect); n_fwd += int'(ev_fwd);
  end
  task automatic chk(logic ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  function automatic word_t w(logic [2:0] t, longint v); return mkword(t, 2'b00, val_t'(v)); endfunction
  function automatic word_t rg(int i); return dut.u_rf.r[i]; endfunction

  localparam logic [2:0] TI = 2, TS = 3, TB_ = 0, TST = 6;
  val_t big;

  initial begin
    imem_rdata = '0; dmem_rdata = '0;
    foreach (imem[i]) begin imem[i] = '0; dmem[i] = '0; end
    imem[0]  = movi(1, TI, 10);
    imem[1]  = movi(2, TI, 3);
    imem[2]  = enc_reg(0, 3'd2, 1'b1, 3'd2, 1, 2, 3);          // SUB sc  r3 = 10-3, C=1
    imem[3]  = enc_reg(0, 3'd2, 1'b1, 3'd3, 2, 1, 4);          // SUBC sc r4 = 3-10-0, N=1 C=0
    imem[4]  = movi(5, TI, 1, CC_MI);                          // executes
    imem[5]  = movi(6, TI, 1, CC_CS);                          // squashed
    imem[6]  = enc_reg(0, 3'd3, 1'b0, 3'd5, 0, 0, 0) | 40'h1_2345;       // LDHI 0x12345
    imem[7]  = enc_reg(0, 3'd3, 1'b0, 3'd6, 0, 0, 0) | (40'h2 << 19);    // LDGC 2'b10
    imem[8]  = enc_imm(0, 3'd0, 1'b0, 3'd0, 0, TI, 7, 16'h6789);         // long ADD r0 -> r7
    imem[9]  = enc_reg(0, 3'd3, 1'b0, 3'd2, 1, 0, 8);          // SLL r1 -> r8
    imem[10] = enc_reg(0, 3'd3, 1'b0, 3'd0, 4, 0, 9);          // SRA r4 -> r9
    imem[11] = enc_reg(0, 3'd3, 1'b1, 3'd5, 0, 0, 0) | (40'd20 << 21);   // SET bit 20
    imem[12] = enc_ctl(0, 1'b0, 3'd7, {3'd0, 5'd20, 21'd15});  // IF bit20 -> 15
    imem[13] = movi(10, TI, 1);
    imem[15] = enc_reg(0, 3'd3, 1'b1, 3'd6, 0, 0, 0) | (40'd20 << 21);   // CLEAR bit 20
    imem[16] = enc_ctl(0, 1'b0, 3'd7, {3'd0, 5'd20, 21'd30});  // not taken
    imem[17] = enc_reg(0, 3'd3, 1'b0, 3'd4, 11, 0, 0);         // SAVPS r11
    imem[18] = movi(12, TI, 1);
    imem[19] = enc_reg(0, 3'd3, 1'b1, 3'd4, 12, 0, 0);         // RESTORPS r12 -> Z=1
    imem[20] = movi(13, TI, 9, CC_EQ);                         // executes
    imem[21] = movi(20, TI, 500);
    imem[22] = enc_reg(0, 3'd5, 1'b0, 3'd2, 20, 1, 0);         // PUSH (pre-dec) H, r1
    imem[23] = enc_imm(0, 3'd6, 1'b0, 3'd4, 20, TST, 14, 16'h77); // PUSH+ & LD H, struc:0x77, r14
    imem[24] = enc_imm(0, 3'd4, 1'b0, 3'd1, 0, 0, 15, 16'd600);   // DRFMEM r0, 600, r15
    imem[25] = movi(16, TI, 600);
    imem[26] = enc_reg(0, 3'd6, 1'b0, 3'd1, 16, 0, 17);        // POP+ & DRF r16, r17
    imem[27] = if_({1'b0, CC_EQ}, 21'd40);                     // taken
    imem[28] = movi(10, TI, 2);
    imem[40] = cmp(15, 1);                                     // tags symbol, integer
    imem[41] = enc_ctl(0, 1'b1, 3'd3, 29'd48);                 // INDEXop1 48 + 3
    imem[51] = enc_ctl(0, 1'b1, 3'd2, 29'd2);                  // TRAPCALL 2 -> 0x420
    imem[52] = goto_(29'd52);
    imem[14'h420] = movi(18, TI, 16'h42);
    imem[14'h421] = ret_(2'd0);
    dmem[600] = w(TB_, 601);
    dmem[601] = w(TS, 42);

    repeat (3) @(posedge clk); #1 rst_n = 1;
    while (!self_loop) @(posedge clk);
    #1;
    big = val_t'(-7);
    chk(rg(3) == w(TI, 7), "sub");
    chk(rg(4) == mkword(TI, 2'b00, big), "subc");
    chk(rg(5) == w(TI, 1) && rg(6) == '0, "cond MI / CS");
    chk(rg(7) == mkword(TI, 2'b10, {19'h1_2345, 16'h6789}), "long immediate with GC bits");
    chk(rg(8) == w(TI, 20), "sll");
    chk(rg(9) == mkword(TI, 2'b00, val_t'(-4)), "sra");
    chk(rg(10) == '0, "skipped by IF bit / IF");
    chk(rg(11)[1] == 1'b1 && rg(11)[0] == 1'b0 && rg(11)[20] == 1'b0 && rg(11)[13:11] == 3'(TI), "savps");
    chk(rg(13) == w(TI, 9), "restorps then EQ");
    chk(rg(14) == w(TI, 499), "push & ld result");
    chk(dmem[499] == w(TST, 16'h77), "push & ld stored");
    chk(rg(15) == w(TS, 42) && rg(17) == w(TS, 42), "drfmem / pop & drf");
    chk(rg(16) == w(TI, 601), "pop & drf pointer");
    chk(rg(18) == w(TI, 16'h42), "trapcall handler");
    chk(rg(28) == w(TI, 52), "trapcall link");
    chk(rg(20) == w(TI, 500), "H after push pre-dec and push+");
    chk(n_stall == 4, $sformatf("stall cycles %0d, expected 4", n_stall));
    chk(n_cycles == n_retire + n_squash + n_stall + 2 * (n_redirect - 1) + 2,
        $sformatf("cycle accounting: %0d cycles, %0d retired, %0d squashed, %0d stall, %0d branches",
                  n_cycles, n_retire, n_squash, n_stall, n_redirect));
    chk(n_fwd > 0, "forwarding used");
    $display("cycles=%0d retired=%0d squashed=%0d stall=%0d branches=%0d forwards=%0d",
             n_cycles, n_retire, n_squash, n_stall, n_redirect, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
