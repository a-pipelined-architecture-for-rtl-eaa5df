// pu_map_rom: partial unify mapping ROM of the LIBRA.
//
// Indexed by the latched tag pair {tag_a, tag_b} (64 entries), it names the
// single operation that a partial unify instruction turns into. The table is
// the one of the architecture's partial unification figure (rows = operand A):
//   either operand a bound reference     -> branch backward to dereference
//   unbound / unbound                    -> bind junior to senior
//   unbound A, non-variable B            -> bind A to B
//   non-variable A, unbound B            -> bind B to A
//   integer/integer, symbol/symbol       -> fail if A != B
//   list x list, struc x struc           -> branch to pre-load address
//   any other pair                       -> fail always
// Combinational, read during decode.
module pu_map_rom
  import libra_pkg::*;
(
  input  logic [2:0] tag_a,
  input  logic [2:0] tag_b,
  output uact_e      act
);
  function automatic logic is_list(logic [2:0] t); return t == T_LIST1  || t == T_LIST2;  endfunction
  function automatic logic is_struc(logic [2:0] t); return t == T_STRUC1 || t == T_STRUC2; endfunction

  always_comb begin
    if (tag_a == T_BOUND || tag_b == T_BOUND)           act = U_DEREF;
    else if (tag_a == T_UNB && tag_b == T_UNB)          act = U_BIND_JS;
    else if (tag_a == T_UNB)                            act = U_BIND_AB;
    else if (tag_b == T_UNB)                            act = U_BIND_BA;
    else if (tag_a == tag_b && (tag_a == T_INT || tag_a == T_SYM)) act = U_FAIL_NE;
    else if (is_list(tag_a) && is_list(tag_b))          act = U_PRELOAD;
    else if (is_struc(tag_a) && is_struc(tag_b))        act = U_PRELOAD;
    else                                                act = U_FAIL;
  end
endmodule
