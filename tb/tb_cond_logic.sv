// tb_cond_logic: every condition code, plain and inverted, against random
// status words.
module tb_cond_logic;
  import libra_pkg::*;
  logic [4:0] cond; logic [PS_W-1:0] ps; logic pass;
  int checks = 0, failures = 0;
  cond_logic dut (.*);
  function automatic logic model(int c, logic [PS_W-1:0] p);
    case (c)
      0: return 1;  1: return p[0];  2: return !p[0]; 3: return p[2]; 4: return !p[2];
      5: return p[1]; 6: return !p[1]; 7: return p[17]; 8: return p[3]; 9: return p[4];
      10: return p[5]; 11: return p[6]; 12: return p[7]; 13: return p[8]; 14: return p[9];
      default: return !(p[10] && p[0]);
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 2000; i++) begin
      cond = 5'($urandom); ps = PS_W'($urandom); #1; checks++;
      if (pass !== (model(int'(cond[3:0]), ps) ^ cond[4])) begin failures++; $display("FAIL cond=%0d ps=%h", cond, ps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
