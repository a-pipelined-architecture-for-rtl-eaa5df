// libra_top: LIBRA processor with its instruction and data memories.
//
// The core (libra_core) is connected to two interleaved memories (16 banks
// each by default): a Harvard arrangement with one instruction fetch and one
// data access per cycle. A host port loads programs and data and reads results
// while the processor is stopped (run low); raising run releases the core
// from reset and it starts fetching at address 0. Host accesses use the same
// one-cycle protocol as the memories: host_rdata is valid the cycle after a
// read of the selected memory (host_isel = 1 instruction memory, 0 data).
// The event outputs pulse once per event of the core (retire, squashed by a
// false condition, dereference stall cycle, taken branch, operand forward,
// partial unify and its action, trail-check bit set, overflow bit set) and
// self_loop marks a GOTO to its own address, which programs use to stop.
module libra_top
  import libra_pkg::*;
#(
  parameter int unsigned BANKS = 16,
  parameter int unsigned IAW   = 14,
  parameter int unsigned DAW   = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            host_en,
  input  logic            host_we,
  input  logic            host_isel,
  input  logic [15:0]     host_addr,
  input  word_t           host_wdata,
  output word_t           host_rdata,
  output logic [PS_W-1:0] ps,
  output pc_t             e_pc,
  output logic            self_loop,
  output logic            ev_retire,
  output logic            ev_squash,
  output logic            ev_stall,
  output logic            ev_redirect,
  output logic            ev_fwd,
  output logic            ev_unify,
  output logic [2:0]      ev_unify_act,
  output logic            ev_trail_set,
  output logic            ev_ovf,
  output logic            ev_hole
);
  logic           core_rst_n;
  logic           c_imem_en, c_dmem_en, c_dmem_we;
  logic [IAW-1:0] c_imem_addr;
  logic [DAW-1:0] c_dmem_addr;
  word_t          c_dmem_wdata, imem_rdata, dmem_rdata;
  uact_e          act;

  logic           im_en, im_we, dm_en, dm_we;
  logic [IAW-1:0] im_addr;
  logic [DAW-1:0] dm_addr;
  word_t          dm_wdata;
  logic           host_isel_q;

  assign core_rst_n = rst_n && run;

  libra_core #(.IAW(IAW), .DAW(DAW)) u_core (
    .clk, .rst_n(core_rst_n),
    .imem_en(c_imem_en), .imem_addr(c_imem_addr), .imem_rdata(imem_rdata),
    .dmem_en(c_dmem_en), .dmem_we(c_dmem_we), .dmem_addr(c_dmem_addr),
    .dmem_wdata(c_dmem_wdata), .dmem_rdata(dmem_rdata),
    .ps_o(ps), .e_pc_o(e_pc), .self_loop, .ev_retire, .ev_squash, .ev_stall,
    .ev_redirect, .ev_fwd, .ev_unify, .ev_unify_act(act), .ev_trail_set, .ev_ovf, .ev_hole);
  assign ev_unify_act = act;

  always_comb begin
    if (run) begin
      im_en = c_imem_en; im_we = 1'b0; im_addr = c_imem_addr;
      dm_en = c_dmem_en; dm_we = c_dmem_we; dm_addr = c_dmem_addr; dm_wdata = c_dmem_wdata;
    end else begin
      im_en = host_en && host_isel;  im_we = host_we; im_addr = host_addr[IAW-1:0];
      dm_en = host_en && !host_isel; dm_we = host_we; dm_addr = host_addr[DAW-1:0];
      dm_wdata = host_wdata;
    end
  end

  interleaved_mem #(.BANKS(BANKS), .AW(IAW), .DW(WORD_W)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(host_wdata), .rdata(imem_rdata));
  interleaved_mem #(.BANKS(BANKS), .AW(DAW), .DW(WORD_W)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dmem_rdata));

  always_ff @(posedge clk) if (host_en) host_isel_q <= host_isel;
  assign host_rdata = host_isel_q ? imem_rdata : dmem_rdata;
endmodule
