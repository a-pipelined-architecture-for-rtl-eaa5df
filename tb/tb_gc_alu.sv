// tb_gc_alu: checks the GC latch (load, hold, reset) and the result GC-bit
// selection of the GC ALU.
module tb_gc_alu;
  logic clk = 0, rst_n = 0, ldgc = 0, use_latch = 0, mark_a, rev_a;
  logic [1:0] gc_imm = 0, gc_a = 0, gc_y, gc_latch_q;
  int checks = 0, failures = 0;
  logic [1:0] model = 0;
  gc_alu dut (.*);
  always #5 clk = ~clk;
  task automatic chk(logic c, string s); checks++; if (!c) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(gc_latch_q == 2'b00, "reset");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ldgc = 1'($urandom); gc_imm = 2'($urandom); gc_a = 2'($urandom); use_latch = 1'($urandom);
      #1;
      chk(gc_y == (use_latch ? model : gc_a), "select");
      chk(mark_a == gc_a[1] && rev_a == gc_a[0], "mark/rev");
      @(posedge clk); if (ldgc) model = gc_imm;
      #1 chk(gc_latch_q == model, "latch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
