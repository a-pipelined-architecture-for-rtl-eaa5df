// cond_logic: instruction conditioning logic of the LIBRA.
//
// Every instruction carries a condition and is squashed to a no-op when it is
// false; this removes most short branch-around sequences. Besides the
// arithmetic flags the conditions include the symbolic ones of the
// architecture: bound1/bound2 (operand is a bound reference), trail1/trail2
// (trail-check scoreboard bit of the operand register was set), env1/env2
// (operand lies in the current environment), sticky overflow (almost stack
// collision), plus var and tag-or-value-differ used by the WAM sequences.
// cond[4] inverts the result (used by IF's 5-bit condition). Combinational.
// The numeric condition codes are this design's own (see libra_pkg).
module cond_logic
  import libra_pkg::*;
(
  input  logic [4:0]      cond,
  input  logic [PS_W-1:0] ps,
  output logic            pass
);
  logic t;
  always_comb begin
    unique case (cond_e'(cond[3:0]))
      CC_AL:     t = 1'b1;
      CC_EQ:     t = ps[PS_Z];
      CC_NE:     t = !ps[PS_Z];
      CC_CS:     t = ps[PS_C];
      CC_CC:     t = !ps[PS_C];
      CC_MI:     t = ps[PS_N];
      CC_PL:     t = !ps[PS_N];
      CC_VAR:    t = ps[PS_VAR];
      CC_BOUND1: t = ps[PS_B1];
      CC_BOUND2: t = ps[PS_B2];
      CC_TRAIL1: t = ps[PS_T1];
      CC_TRAIL2: t = ps[PS_T2];
      CC_ENV1:   t = ps[PS_E1];
      CC_ENV2:   t = ps[PS_E2];
      CC_OVF:    t = ps[PS_OVF];
      CC_TVNE:   t = !(ps[PS_TEQ] && ps[PS_Z]);
      default:   t = 1'b1;
    endcase
    pass = t ^ cond[4];
  end
endmodule
