// tb_trail_scoreboard: random set/clear traffic against a bit-vector model.
module tb_trail_scoreboard;
  logic clk = 0, rst_n = 0, set_we, set_val, clr_we, sb1, sb2;
  logic [4:0] set_idx, clr_idx, ra1, ra2;
  logic [31:0] m = '0;
  int checks = 0, failures = 0;
  trail_scoreboard dut (.*);
  always #5 clk = ~clk;
  function automatic logic e(logic [4:0] a);
    if (set_we && set_idx == a) return set_val;
    if (clr_we && clr_idx == a) return 1'b0;
    return m[a];
  endfunction
  initial begin
    {set_we, set_val, clr_we, set_idx, clr_idx, ra1, ra2} = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      set_we = 1'($urandom); set_val = ($urandom % 3) != 0; set_idx = 5'($urandom % 8);
      clr_we = ($urandom % 4) == 0; clr_idx = 5'($urandom % 8);
      ra1 = 5'($urandom % 8); ra2 = set_idx; #1;
      checks += 2;
      if (sb1 !== e(ra1)) begin failures++; $display("FAIL sb1 %0d", ra1); end
      if (sb2 !== e(ra2)) begin failures++; $display("FAIL sb2 %0d", ra2); end
      @(posedge clk);
      if (clr_we) m[clr_idx] = 1'b0;
      if (set_we) m[set_idx] = set_val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
