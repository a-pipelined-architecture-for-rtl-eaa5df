// tb_tag_alu: exhaustive test of the tag ALU over all tag pairs and both
// tag-select settings.
module tb_tag_alu;
  logic [2:0] tag_a, tag_b, tag_imm, tag_y; logic use_imm, teq, bound_a, bound_b, unb_a, unb_b;
  logic [5:0] alt_uaddr;
  int checks = 0, failures = 0;
  tag_alu dut (.*);
  initial begin
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) for (int u = 0; u < 2; u++) begin
      tag_a = 3'(i); tag_b = 3'(j); tag_imm = 3'(7 - i); use_imm = 1'(u); #1;
      checks++;
      if (tag_y !== (u ? 3'(7 - i) : 3'(i)) || teq !== (i == j) || bound_a !== (i == 0) ||
          bound_b !== (j == 0) || unb_a !== (i == 1) || unb_b !== (j == 1) ||
          alt_uaddr !== 6'(i * 8 + j)) begin
        failures++; $display("FAIL a=%0d b=%0d u=%0d", i, j, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
