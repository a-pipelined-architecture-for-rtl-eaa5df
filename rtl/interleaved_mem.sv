// interleaved_mem: word-interleaved memory used for LIBRA instruction and data.
//
// The address space is split over BANKS banks, bank = addr mod BANKS, so
// consecutive words (stack pushes, sequential instruction fetch) fall in
// different banks. The architecture relies on 16-way interleaving; the bank
// count is a parameter with that default. Each bank is a synchronous
// single-port array. One access per cycle: with en high, a write stores wdata,
// a read returns the word in rdata on the next cycle; with en low rdata holds.
// The bank busy time of slow memory parts is not modelled, and the size (AW)
// is this design's choice. No reset: contents are loaded by the user.
module interleaved_mem
  import libra_pkg::*;
#(
  parameter int unsigned BANKS = 16,
  parameter int unsigned AW    = 14,
  parameter int unsigned DW    = 40
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned DEPTH = (1 << AW) / BANKS;

  logic [DW-1:0] bank [BANKS][DEPTH];
  logic [BW-1:0]    bsel;
  logic [AW-BW-1:0] row;
  assign bsel = addr[BW-1:0];
  assign row  = addr[AW-1:BW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) bank[bsel][row] <= wdata;
      else    rdata <= bank[bsel][row];
    end
  end
endmodule
