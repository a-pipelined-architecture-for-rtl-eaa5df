// template_pc: template and difference program counters of the LIBRA.
//
// Clauses of one procedure often compile to almost the same code. A clause
// "template" holds the common instructions with holes where the clauses
// differ; a separate "difference" stream holds, clause after clause, only the
// instructions that fill the holes. The template is then executed once per
// clause, and every hole takes the next instruction of the difference stream.
// The instruction PC acts as the template PC; this unit adds the difference
// PC (DPC) and the one-instruction detour through the difference stream.
//
// Operation (all at the clock edge):
//   ld_dpc      LDDPC executed in E: DPC <= ld_val (start of a difference stream).
//   hole        HOLE executed in E: fetch is redirected to DPC (hole_target),
//               DPC advances by one and the return address hole_pc+1 is kept;
//               ret_pend rises.
//   advance     fetch moved on by one instruction (no stall, no redirect):
//               while ret_pend is high the fetch unit takes ret_pc instead of
//               PC+1, and ret_pend falls - exactly one difference instruction
//               is executed per hole, with no extra cycle for the return.
//   redirect_other  any other taken branch cancels a pending return.
// A hole therefore costs the two-cycle penalty of a taken branch.
// The architecture gives the purpose of the two counters; how a hole is
// marked (a HOLE instruction), how DPC is loaded (LDDPC) and the timing
// above are this design's own choices.
module template_pc
  import libra_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ld_dpc,
  input  pc_t  ld_val,
  input  logic hole,
  input  pc_t  hole_pc,
  input  logic advance,
  input  logic redirect_other,
  output pc_t  hole_target,
  output logic ret_pend,
  output pc_t  ret_pc,
  output pc_t  dpc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dpc <= '0; ret_pend <= 1'b0; ret_pc <= '0;
    end else begin
      if (ld_dpc) dpc <= ld_val;
      if (hole) begin
        dpc      <= dpc + 1'b1;
        ret_pend <= 1'b1;
        ret_pc   <= hole_pc + 1'b1;
      end else if (redirect_other || advance) begin
        ret_pend <= 1'b0;
      end
    end
  end
  assign hole_target = dpc;
endmodule
