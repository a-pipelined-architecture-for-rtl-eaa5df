// trail_scoreboard: trail-check scoreboard of the LIBRA.
//
// One status bit per register. When a load or dereference writes a register
// with an unbound variable that would have to be trailed if it were bound
// later, the bit of that register is set; any other write to the register
// clears it. The bits of the two operands of the next condition-setting
// instruction become the trail1/trail2 conditions, so the trailing push after
// a binding is simply conditionally executed. Bits change on the clock edge
// (set port has priority over the clear port for the same register); reads
// are combinational with write-through. The clear-on-other-write rule is this
// design's choice.
module trail_scoreboard #(
  parameter int unsigned NREGS = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       set_we,
  input  logic [4:0] set_idx,
  input  logic       set_val,
  input  logic       clr_we,
  input  logic [4:0] clr_idx,
  input  logic [4:0] ra1,
  input  logic [4:0] ra2,
  output logic       sb1,
  output logic       sb2
);
  logic [NREGS-1:0] sb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sb <= '0;
    else begin
      if (clr_we) sb[clr_idx] <= 1'b0;
      if (set_we) sb[set_idx] <= set_val;
    end
  end

  function automatic logic rd(logic [4:0] a);
    if (set_we && set_idx == a)      return set_val;
    else if (clr_we && clr_idx == a) return 1'b0;
    else                             return sb[a];
  endfunction

  assign sb1 = rd(ra1);
  assign sb2 = rd(ra2);
endmodule
