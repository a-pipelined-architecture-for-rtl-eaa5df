// ialu: instruction fetch ALU (PC ALU) of the LIBRA.
//
// Computes whether the instruction in execute redirects fetch, and where to.
// Most branches are counter loads of a partial field: a page branch replaces
// only the low 9, 16 or 21 bits of the PC ("page address generation
// multiplexers"), so it needs no adder. Kinds handled:
//   ABS/CALL  GOTO/CALL Absolute29          RET     return register value
//   SWITCH    three Page9 targets for constant (integer, symbol), list and
//             structure tags of operand A; other tags fall through
//   IF        Page21 when the branch condition (if_pass) holds
//   IFBIT     Page21 when the selected status bit is set
//   INDEX1/2/B Page21 base plus tag A, tag B or {tag A, tag B}
//   TRAP/TRAPCALL  vector from the trap address ROM, selected by operand[3:0]
//   PAGE16    partial unify "branch to pre-load address"
//   DEREF     partial unify "branch backward to dereference": pc - d, d in
//             operand[18:16] (0 means 8)
//   FAIL / FAIL_NE  failure vector (trap ROM entry 0), FAIL_NE only when the
//             values differ
// Combinational. The target assignments of SWITCH, INDEX and the trap ROM
// contents (vector k at 0x400 + 16*k) are this design's choices.
module ialu
  import libra_pkg::*;
(
  input  br_e        br,
  input  pc_t        pc,
  input  logic [28:0] ops,
  input  logic [2:0] tag_a,
  input  logic [2:0] tag_b,
  input  logic       if_pass,
  input  logic       bit_set,
  input  logic       vals_eq,
  input  pc_t        ret_addr,
  output logic       take,
  output pc_t        target
);
  function automatic pc_t trap_rom(logic [3:0] k);
    return pc_t'(29'h400 + 29'({k, 4'd0}));
  endfunction

  logic [8:0]  p9_con, p9_lst, p9_str;
  logic [15:0] p16;
  logic [20:0] p21;
  logic [2:0]  d;
  assign p9_con = ops[26:18];
  assign p9_lst = ops[17:9];
  assign p9_str = ops[8:0];
  assign p16    = ops[15:0];
  assign p21    = ops[20:0];
  assign d      = ops[18:16];

  always_comb begin
    take   = 1'b0;
    target = pc + 1'b1;
    unique case (br)
      BR_NONE: ;
      BR_ABS, BR_CALL: begin take = 1'b1; target = ops; end
      BR_RET:  begin take = 1'b1; target = ret_addr; end
      BR_SWITCH: begin
        if (tag_a == T_INT || tag_a == T_SYM)          begin take = 1'b1; target = {pc[28:9], p9_con}; end
        else if (tag_a == T_LIST1 || tag_a == T_LIST2) begin take = 1'b1; target = {pc[28:9], p9_lst}; end
        else if (tag_a == T_STRUC1 || tag_a == T_STRUC2) begin take = 1'b1; target = {pc[28:9], p9_str}; end
      end
      BR_IF:    begin take = if_pass; target = {pc[28:21], p21}; end
      BR_IFBIT: begin take = bit_set; target = {pc[28:21], p21}; end
      BR_INDEX1: begin take = 1'b1; target = {pc[28:21], p21 + 21'(tag_a)}; end
      BR_INDEX2: begin take = 1'b1; target = {pc[28:21], p21 + 21'(tag_b)}; end
      BR_INDEXB: begin take = 1'b1; target = {pc[28:21], p21 + 21'({tag_a, tag_b})}; end
      BR_TRAP, BR_TRAPCALL: begin take = 1'b1; target = trap_rom(ops[3:0]); end
      BR_PAGE16: begin take = 1'b1; target = {pc[28:16], p16}; end
      BR_DEREF:  begin take = 1'b1; target = pc - ((d == 3'd0) ? pc_t'(8) : pc_t'(d)); end
      BR_FAIL:   begin take = 1'b1; target = trap_rom(4'd0); end
      BR_FAIL_NE: begin take = !vals_eq; target = trap_rom(4'd0); end
      default: ;
    endcase
  end
endmodule
