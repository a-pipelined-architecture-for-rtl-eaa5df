// tb_deref_chains: dereference-and-unify on reference chains of 0 to 8
// links, on the full-size processor (all parameters at their defaults).
// For each chain length n, variable X (r1) reaches an unbound variable after
// n bound references (the one in the register, then n-1 in memory) and is
// unified with the integer 42 (r2), in
// two ways:
//   loop form   the partial unify instruction itself branches back to a pair
//               of conditional loads while either operand is a bound
//               reference:  loop: if bound1 LD X; if bound2 LD A;
//               enter: SUB sc X, A, r0; UNIFY sc X, A (back 3)
//   DRF form    the dereference unit follows the chain (pipeline stall),
//               then compare and unify run once.
// Both must bind the variable to 42. The cycle counts are checked against
// the pipeline rules: each link costs the loop form one pass (load, squashed
// load, compare, unify, two branch bubbles = 6 cycles) and the DRF form one
// stall cycle. The measured counts are printed per chain length.
module tb_deref_chains;
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

  int checks = 0, failures = 0, n_cycles = 0;
  always @(posedge clk) if (run) n_cycles++;

  localparam logic [2:0] TB_ = 0, TU = 1, TI = 2;
  localparam int VAR_AT = 300;

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

  // load a program and a chain of n links, run to the closing self-loop,
  // return the cycle count and check the binding
  task automatic run_one(input bit loop_form, input int n, output int cycles);
    word_t d;
    iw_t p [8];
    int len;
    // prologue: X = first link (the variable itself for n = 0), A = 42
    p[0] = (n == 0) ? movi(1, TU, 16'(VAR_AT)) : movi(1, TB_, (n == 1) ? 16'(VAR_AT) : 16'd200);
    p[1] = movi(2, TI, 16'd42);
    if (loop_form) begin
      p[2] = goto_(29'd5);
      p[3] = ld(1, 0, 1, CC_BOUND1);           // loop
      p[4] = ld(2, 0, 2, CC_BOUND2);
      p[5] = cmp(1, 2);                        // enter
      p[6] = unify(1, 2, 3'd3, 16'd0);         // bound operand: back to loop
      p[7] = goto_(29'd7);
      len = 8;
    end else begin
      p[2] = drf(1, 1);
      p[3] = drf(2, 2);
      p[4] = cmp(1, 2);
      p[5] = unify(1, 2, 3'd0, 16'd0);
      p[6] = goto_(29'd6);
      len = 7;
    end
    for (int i = 0; i < len; i++) hw(1'b1, 16'(i), p[i]);
    // n references in all: the register, then n-1 words in memory
    for (int i = 0; i < n - 2; i++) hw(1'b0, 16'(200 + i), w(TB_, 201 + i));
    if (n > 1) hw(1'b0, 16'(200 + n - 2), w(TB_, VAR_AT));
    hw(1'b0, 16'(VAR_AT), w(TU, VAR_AT));
    @(negedge clk);
    n_cycles = 0;
    run = 1;
    while (!self_loop) @(posedge clk);
    cycles = n_cycles;
    repeat (2) @(posedge clk); #1;
    chk(dut.u_core.u_rf.r[1] == w(TU, VAR_AT), $sformatf("%s n=%0d: X dereferenced", loop_form ? "loop" : "drf", n));
    run = 0;
    hr(16'(VAR_AT), d);
    chk(d == w(TI, 42), $sformatf("%s n=%0d: variable bound to 42", loop_form ? "loop" : "drf", n));
  endtask

  initial begin
    int c_loop [9], c_drf [9];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n <= 8; n++) begin
      run_one(1'b1, n, c_loop[n]);
      run_one(1'b0, n, c_drf[n]);
      $display("links=%0d  loop form %0d cycles  drf form %0d cycles", n, c_loop[n], c_drf[n]);
    end
    for (int n = 1; n <= 8; n++) begin
      chk(c_loop[n] - c_loop[0] == 6 * n, $sformatf("loop form: %0d extra cycles for %0d links", c_loop[n] - c_loop[0], n));
      chk(c_drf[n] - c_drf[0] == n, $sformatf("drf form: %0d extra cycles for %0d links", c_drf[n] - c_drf[0], n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
