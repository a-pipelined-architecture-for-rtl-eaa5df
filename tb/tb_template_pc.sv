// tb_template_pc: self-checking test of the template/difference PC unit.
// A reference model in the bench (difference PC, pending-return flag and
// return address) is updated by the rules of the unit and compared with the
// outputs after every clock, under random sequences of LDDPC, HOLE, fetch
// advance, stall and other redirects. A directed part checks one template
// pass: two holes take consecutive difference-stream addresses and each
// returns to the instruction after its hole after exactly one fetch.
module tb_template_pc;
  import libra_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld_dpc = 0, hole = 0, advance = 0, redirect_other = 0;
  pc_t  ld_val = '0, hole_pc = '0;
  pc_t  hole_target, ret_pc, dpc;
  logic ret_pend;

  template_pc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pc_t m_dpc = '0, m_ret = '0; logic m_pend = 0;

  task automatic chk(logic ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic step();
    @(posedge clk);
    if (ld_dpc) m_dpc = ld_val;
    if (hole) begin m_dpc = m_dpc + 1; m_pend = 1; m_ret = hole_pc + 1; end
    else if (redirect_other || advance) m_pend = 0;
    #1;
    chk(dpc == m_dpc && hole_target == m_dpc, $sformatf("dpc %0h exp %0h", dpc, m_dpc));
    chk(ret_pend == m_pend, "ret_pend");
    if (m_pend) chk(ret_pc == m_ret, "ret_pc");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk(dpc == '0 && !ret_pend, "reset");
    // directed: LDDPC 0x480, then one template pass with two holes
    @(negedge clk); ld_dpc = 1; ld_val = 29'h480; step(); @(negedge clk); ld_dpc = 0;
    chk(dpc == 29'h480, "loaded");
    hole = 1; hole_pc = 29'h404; step(); @(negedge clk); hole = 0;
    chk(ret_pend && ret_pc == 29'h405 && dpc == 29'h481, "hole 1 detour");
    advance = 1; step(); @(negedge clk); advance = 0;
    chk(!ret_pend, "one difference instruction, then back");
    hole = 1; hole_pc = 29'h406; step(); @(negedge clk); hole = 0;
    chk(ret_pend && ret_pc == 29'h407 && dpc == 29'h482, "hole 2 detour");
    // a stall (no advance) keeps the return pending
    step(); step();
    chk(ret_pend, "return held over a stall");
    advance = 1; step(); @(negedge clk); advance = 0;
    // a redirect by another branch cancels the return
    hole = 1; hole_pc = 29'h500; step(); @(negedge clk); hole = 0;
    redirect_other = 1; step(); @(negedge clk); redirect_other = 0;
    chk(!ret_pend, "redirect cancels return");
    // random
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ld_dpc = ($urandom % 10) == 0; ld_val = pc_t'($urandom);
      hole = !ld_dpc && ($urandom % 4) == 0; hole_pc = pc_t'($urandom);
      advance = $urandom % 2; redirect_other = ($urandom % 8) == 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
