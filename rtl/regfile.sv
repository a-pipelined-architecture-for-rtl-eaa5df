// regfile: the 32-register, non-orthogonal register file of the LIBRA.
//
// 32 x 40-bit registers, all visible: r0 always reads zero, r0-r19 are
// general purpose, r20-r23 stack pointers (H, E, B, TR), r24-r27 bounds
// registers (HB, EB, SLIM, TLIM) and r28-r31 return address registers
// (CP0-CP3). The register roles and counts follow the architecture; the
// numbering is this design's own. Three read ports serve r1, r2 and r3
// (store data). Two write ports let one instruction write a destination
// (port A) and update a stack pointer (port B) in the same cycle, which is what
// push-and-load-reference and pop need. Reads are combinational and see a
// write of the same cycle (write-through); writes happen on the clock edge.
// When both ports write one register, port A wins. All registers are also
// brought out (regs) for the bounds and environment checks.
module regfile
  import libra_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] ra1, ra2, ra3,
  output word_t      rd1, rd2, rd3,
  input  logic       we_a,
  input  logic [4:0] wa_a,
  input  word_t      wd_a,
  input  logic       we_b,
  input  logic [4:0] wa_b,
  input  word_t      wd_b,
  output word_t      regs [NREGS]
);
  word_t r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) r[i] <= '0;
    end else begin
      if (we_b && wa_b != R_ZERO) r[wa_b] <= wd_b;
      if (we_a && wa_a != R_ZERO) r[wa_a] <= wd_a;
    end
  end

  function automatic word_t rd(logic [4:0] a);
    if (a == R_ZERO)              return '0;
    else if (we_a && wa_a == a)   return wd_a;
    else if (we_b && wa_b == a)   return wd_b;
    else                          return r[a];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);
  assign rd3 = rd(ra3);
  assign regs = r;
endmodule
