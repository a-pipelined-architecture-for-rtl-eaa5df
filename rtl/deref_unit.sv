// deref_unit: dereferencing hardware of the LIBRA value ALU.
//
// Follows a chain of bound references (tag "bound", value = address of the
// next word) until it reaches a word that is not a reference, and returns that
// word. It is the only source of a pipeline interlock: while it walks the
// chain the execute stage holds (busy) and bubbles go to write-back.
// Timing, with a memory that answers one cycle after a request:
//  * start with from_mem = 0 and a non-reference word: done in the same cycle,
//    result = word, no memory access.
//  * start with from_mem = 0 and a reference: one read per link; done in the
//    cycle the first non-reference word arrives (1 + links cycles in all).
//  * start with from_mem = 1: the first read is at addr (DRFMEM / POP & DRF),
//    then as above.
// start is sampled only while idle. The number of links walked is counted in
// hops for statistics. The chain length is not limited (own choice).
module deref_unit
  import libra_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  from_mem,
  input  word_t word,
  input  val_t  addr,
  input  word_t mem_rdata,
  output logic  mem_req,
  output val_t  mem_addr,
  output logic  busy,
  output logic  done,
  output word_t result,
  output logic [15:0] hops
);
  typedef enum logic { IDLE, WAIT } st_e;
  st_e st, st_n;

  always_comb begin
    st_n     = st;
    mem_req  = 1'b0;
    mem_addr = '0;
    busy     = 1'b0;
    done     = 1'b0;
    result   = word;
    unique case (st)
      IDLE: if (start) begin
        if (from_mem) begin
          mem_req = 1'b1; mem_addr = addr; busy = 1'b1; st_n = WAIT;
        end else if (w_tag(word) == T_BOUND) begin
          mem_req = 1'b1; mem_addr = w_val(word); busy = 1'b1; st_n = WAIT;
        end else begin
          done = 1'b1;
        end
      end
      WAIT: begin
        result = mem_rdata;
        if (w_tag(mem_rdata) == T_BOUND) begin
          mem_req = 1'b1; mem_addr = w_val(mem_rdata); busy = 1'b1;
        end else begin
          done = 1'b1; st_n = IDLE;
        end
      end
      default: st_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      hops <= '0;
    end else begin
      st <= st_n;
      if (mem_req && !(st == IDLE && from_mem)) hops <= hops + 16'd1;
    end
  end
endmodule
