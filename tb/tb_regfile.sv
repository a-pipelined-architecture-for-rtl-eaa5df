// tb_regfile: random dual-port writes and triple reads against a model,
// including r0 = 0, write-through reads and port-A priority.
module tb_regfile;
  import libra_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, ra3, wa_a, wa_b; word_t rd1, rd2, rd3, wd_a, wd_b; logic we_a, we_b;
  word_t regs [32];
  word_t m [32];
  int checks = 0, failures = 0;
  regfile dut (.*);
  always #5 clk = ~clk;
  function automatic word_t exp_rd(logic [4:0] a);
    if (a == 0) return '0;
    if (we_a && wa_a == a) return wd_a;
    if (we_b && wa_b == a) return wd_b;
    return m[a];
  endfunction
  initial begin
    foreach (m[i]) m[i] = '0;
    {we_a, we_b, ra1, ra2, ra3, wa_a, wa_b, wd_a, wd_b} = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we_a = 1'($urandom); we_b = 1'($urandom); wa_a = 5'($urandom); wa_b = (i % 7 == 0) ? wa_a : 5'($urandom);
      wd_a = {$urandom, $urandom}; wd_b = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = wa_a; ra3 = wa_b; #1;
      checks += 3;
      if (rd1 !== exp_rd(ra1)) begin failures++; $display("FAIL rd1 r%0d", ra1); end
      if (rd2 !== exp_rd(ra2)) begin failures++; $display("FAIL rd2 r%0d", ra2); end
      if (rd3 !== exp_rd(ra3)) begin failures++; $display("FAIL rd3 r%0d", ra3); end
      @(posedge clk);
      if (we_b && wa_b != 0) m[wa_b] = wd_b;
      if (we_a && wa_a != 0) m[wa_a] = wd_a;
      #1; checks++;
      if (regs[wa_a] !== m[wa_a]) begin failures++; $display("FAIL regs r%0d", wa_a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
