// tb_interleaved_mem: random reads and writes against an associative model;
// also sweeps consecutive addresses so every bank is used.
module tb_interleaved_mem;
  localparam int AW = 10;
  logic clk = 0, en, we; logic [AW-1:0] addr; logic [39:0] wdata, rdata;
  logic [39:0] m [logic [AW-1:0]];
  int checks = 0, failures = 0;
  interleaved_mem #(.BANKS(16), .AW(AW), .DW(40)) dut (.*);
  always #5 clk = ~clk;
  task automatic wr(logic [AW-1:0] a, logic [39:0] d);
    @(negedge clk); en = 1; we = 1; addr = a; wdata = d; @(posedge clk); m[a] = d;
  endtask
  task automatic rdchk(logic [AW-1:0] a);
    @(negedge clk); en = 1; we = 0; addr = a; @(posedge clk); #1;
    if (m.exists(a)) begin
      checks++;
      if (rdata !== m[a]) begin failures++; $display("FAIL a=%0d %h exp %h", a, rdata, m[a]); end
    end
  endtask
  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) wr(AW'(i), {8'(i), 32'(i * 3)});
    for (int i = 0; i < 64; i++) rdchk(AW'(i));
    for (int i = 0; i < 3000; i++)
      if ($urandom % 2) wr(AW'($urandom), {$urandom, $urandom}); else rdchk(AW'($urandom % 64));
    // rdata holds while en is low
    rdchk(5); @(negedge clk); en = 0; addr = 6; @(posedge clk); #1; checks++;
    if (rdata !== m[5]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
