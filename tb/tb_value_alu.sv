// tb_value_alu: self-checking test of the value ALU against a 64-bit reference.
// Random operands for every operation plus carry-chain corner cases.
module tb_value_alu;
  import libra_pkg::*;
  aluop_e op; val_t a, b, y; logic cin, cout, z, n;
  int checks = 0, failures = 0;
  value_alu dut (.*);

  function automatic logic [35:0] ref_model(aluop_e o, val_t x, val_t yv, logic c);
    longint unsigned xa = 64'(x), yb = 64'(yv), r;
    logic co; r = 0; co = 0;
    case (o)
      A_ADD:  begin r = xa + yb; co = r[35]; end
      A_ADDC: begin r = xa + yb + 64'(c); co = r[35]; end
      A_SUB:  begin r = xa - yb; co = (xa >= yb); end
      A_SUBC: begin r = xa - yb - 64'(!c); co = (xa >= yb + 64'(!c)); end
      A_AND:  r = xa & yb;
      A_OR:   r = xa | yb;
      A_XOR:  r = xa ^ yb;
      A_SRA:  begin r = {x[34], x[34:1]}; co = x[0]; end
      A_SLA:  begin r = 64'({x[34], x[32:0], 1'b0}); co = x[33]; end
      A_SLL:  begin r = 64'({x[33:0], 1'b0}); co = x[34]; end
      A_PASSB: r = yb;
      default: r = 0;
    endcase
    return {co, r[34:0]};
  endfunction

  task automatic try(aluop_e o, val_t x, val_t yv, logic c);
    logic [35:0] e;
    op = o; a = x; b = yv; cin = c; #1;
    e = ref_model(o, x, yv, c);
    checks++;
    if (y !== e[34:0] || cout !== e[35] || z !== (e[34:0] == 0) || n !== e[34]) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h cin=%b -> y=%h c=%b exp y=%h c=%b", o.name(), x, yv, c, y, cout, e[34:0], e[35]);
    end
  endtask

  initial begin
    for (int o = 0; o <= 10; o++) begin
      try(aluop_e'(o), '1, 35'd1, 1'b1);
      try(aluop_e'(o), '0, '0, 1'b0);
      try(aluop_e'(o), 35'h4_0000_0000, 35'h4_0000_0000, 1'b0);
      for (int i = 0; i < 300; i++)
        try(aluop_e'(o), {$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
