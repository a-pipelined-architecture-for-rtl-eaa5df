// tb_bounds_check: trail, environment and collision checks on random values
// around fixed bounds, plus the boundary values themselves.
module tb_bounds_check;
  import libra_pkg::*;
  val_t v, hb, eb, slim, tlim, e, h, tr; logic trail, env, h_ovf, t_ovf;
  int checks = 0, failures = 0;
  bounds_check dut (.*);
  task automatic t1(val_t x);
    v = x; #1; checks++;
    if (trail !== ((x < 1000) || (x >= 5000 && x < 6000)) || env !== (x >= 7000)) begin
      failures++; $display("FAIL v=%0d trail=%b env=%b", x, trail, env);
    end
  endtask
  initial begin
    hb = 1000; eb = 6000; slim = 5000; tlim = 9000; e = 7000; h = 0; tr = 0;
    t1(0); t1(999); t1(1000); t1(4999); t1(5000); t1(5999); t1(6000); t1(6999); t1(7000);
    for (int i = 0; i < 1000; i++) t1(val_t'($urandom % 10000));
    for (int i = 0; i < 200; i++) begin
      h = val_t'($urandom % 10000); tr = val_t'($urandom % 10000); #1; checks++;
      if (h_ovf !== (h >= 5000) || t_ovf !== (tr >= 9000)) begin failures++; $display("FAIL ovf"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
