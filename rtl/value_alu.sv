// value_alu: arithmetic, logic and shift unit of the LIBRA value datapath.
//
// Works on the 35-bit value field of a word; the tag and GC fields are handled
// by the tag and GC ALUs in parallel. Operations are those of the arithmetic
// classes of the instruction set (ADD, ADDC, SUB, SUBC, AND, OR, XOR) and the
// one-bit shifts (SRA, SLA, SLL), plus PASSB used to move an immediate.
// Purely combinational: y, cout, z and n settle in the execute stage.
// Own choices: the carry conventions (subtract is a + ~b + 1 with carry =
// no-borrow, SUBC is a + ~b + cin) and that shifts move one bit, with the bit
// shifted out going to cout, because the shift instructions carry no amount.
module value_alu
  import libra_pkg::*;
(
  input  aluop_e     op,
  input  val_t       a,
  input  val_t       b,
  input  logic       cin,
  output val_t       y,
  output logic       cout,
  output logic       z,
  output logic       n
);
  logic [VAL_W:0] sum;

  always_comb begin
    sum  = '0;
    y    = '0;
    cout = 1'b0;
    unique case (op)
      A_ADD:  begin sum = {1'b0, a} + {1'b0, b};                y = sum[VAL_W-1:0]; cout = sum[VAL_W]; end
      A_ADDC: begin sum = {1'b0, a} + {1'b0, b} + {{VAL_W{1'b0}}, cin}; y = sum[VAL_W-1:0]; cout = sum[VAL_W]; end
      A_SUB:  begin sum = {1'b0, a} + {1'b0, ~b} + 1'b1;        y = sum[VAL_W-1:0]; cout = sum[VAL_W]; end
      A_SUBC: begin sum = {1'b0, a} + {1'b0, ~b} + {{VAL_W{1'b0}}, cin}; y = sum[VAL_W-1:0]; cout = sum[VAL_W]; end
      A_AND:  y = a & b;
      A_OR:   y = a | b;
      A_XOR:  y = a ^ b;
      A_SRA:  begin y = {a[VAL_W-1], a[VAL_W-1:1]}; cout = a[0]; end
      A_SLA:  begin y = {a[VAL_W-1], a[VAL_W-3:0], 1'b0}; cout = a[VAL_W-2]; end
      A_SLL:  begin y = {a[VAL_W-2:0], 1'b0}; cout = a[VAL_W-1]; end
      A_PASSB: y = b;
      default: y = '0;
    endcase
  end

  assign z = (y == '0);
  assign n = y[VAL_W-1];
endmodule
