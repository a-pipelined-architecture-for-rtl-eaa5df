// gc_alu: garbage-collection bit unit of the LIBRA.
//
// Each word carries a mark bit and a reverse bit (bits 36:35) for
// mark-and-sweep collection. This unit holds the 2-bit GC immediate loaded by
// LDGC / LDGCHI, chooses the GC bits of a result (those of operand A, or the
// latched immediate for long-immediate instructions so that a full word can be
// built), and reports the mark and reverse bits of operand A.
// The latch loads on the clock edge when ldgc is high; everything else is
// combinational. The architecture only names this unit; the latch and the
// selection are this design's reading of what the GC instructions need.
module gc_alu (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ldgc,
  input  logic [1:0] gc_imm,
  input  logic [1:0] gc_a,
  input  logic       use_latch,
  output logic [1:0] gc_y,
  output logic       mark_a,
  output logic       rev_a,
  output logic [1:0] gc_latch_q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     gc_latch_q <= 2'b00;
    else if (ldgc)  gc_latch_q <= gc_imm;

  assign gc_y   = use_latch ? gc_latch_q : gc_a;
  assign mark_a = gc_a[1];
  assign rev_a  = gc_a[0];
endmodule
