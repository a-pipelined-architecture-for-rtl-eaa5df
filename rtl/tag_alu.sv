// tag_alu: tag datapath of the LIBRA, running beside the value ALU.
//
// Chooses the tag of a result (the tag of operand A, or the immediate tag t3
// when an instruction overrides it), compares the two operand tags, classifies
// them (bound reference, unbound variable) for the symbolic conditions, and
// forms the alternate microcode address {tag_a, tag_b} that is latched by every
// instruction that sets condition codes and later read by partial unify.
// Combinational. The tag codes come from libra_pkg (own choice of encoding).
module tag_alu
  import libra_pkg::*;
(
  input  logic [2:0] tag_a,
  input  logic [2:0] tag_b,
  input  logic [2:0] tag_imm,
  input  logic       use_imm,
  output logic [2:0] tag_y,
  output logic       teq,
  output logic       bound_a,
  output logic       bound_b,
  output logic       unb_a,
  output logic       unb_b,
  output logic [5:0] alt_uaddr
);
  assign tag_y     = use_imm ? tag_imm : tag_a;
  assign teq       = (tag_a == tag_b);
  assign bound_a   = (tag_a == T_BOUND);
  assign bound_b   = (tag_b == T_BOUND);
  assign unb_a     = (tag_a == T_UNB);
  assign unb_b     = (tag_b == T_UNB);
  assign alt_uaddr = {tag_a, tag_b};
endmodule
