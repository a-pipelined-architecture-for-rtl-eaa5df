// bounds_check: bounds-register half-comparators of the LIBRA value ALU.
//
// Three checks run on every relevant value without costing an instruction:
//  * trail: an unbound variable at address v must be trailed when bound if it
//    is older than the last choice point: v < HB (heap), or v in the stack
//    region (v >= SLIM) and v < EB. This is the usual WAM rule; the exact
//    comparison set is this design's choice.
//  * env: v lies in the current environment (v >= E), the "current variable"
//    test of put_unsafe_value.
//  * collision: the heap pointer has reached SLIM, or the trail pointer TLIM.
//    These feed the sticky overflow bit so that garbage collection can be
//    started at a convenient point instead of checking at every call.
// Combinational; unsigned comparisons on 35-bit values.
module bounds_check
  import libra_pkg::*;
(
  input  val_t v,
  input  val_t hb,
  input  val_t eb,
  input  val_t slim,
  input  val_t tlim,
  input  val_t e,
  input  val_t h,
  input  val_t tr,
  output logic trail,
  output logic env,
  output logic h_ovf,
  output logic t_ovf
);
  assign trail = (v < hb) || ((v >= slim) && (v < eb));
  assign env   = (v >= e);
  assign h_ovf = (h >= slim);
  assign t_ovf = (tr >= tlim);
endmodule
