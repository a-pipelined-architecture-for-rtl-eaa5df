// tb_deref_unit: builds reference chains of length 0..6 in a memory model and
// checks the word found and the number of cycles (1 + links for a register
// operand, 2 + links when the first word is read from memory).
module tb_deref_unit;
  import libra_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, from_mem = 0, mem_req, busy, done;
  word_t word, mem_rdata, result; val_t addr, mem_addr; logic [15:0] hops;
  word_t mem [256];
  int checks = 0, failures = 0;
  deref_unit dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mem_req) mem_rdata <= mem[mem_addr[7:0]];

  task automatic run(word_t w, logic fm, val_t a, word_t exp, int exp_cycles);
    int cyc = 0;
    @(negedge clk); start = 1; from_mem = fm; word = w; addr = a;
    forever begin
      #1; cyc++;
      if (done) break;
      @(negedge clk);
      if (cyc > 50) break;
    end
    checks += 2;
    if (result !== exp) begin failures++; $display("FAIL result %h exp %h", result, exp); end
    if (cyc != exp_cycles) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, exp_cycles); end
    @(posedge clk); #1 start = 0;
  endtask

  initial begin
    word = '0; addr = '0; mem_rdata = '0;
    foreach (mem[i]) mem[i] = mkword(T_INT, 2'b00, val_t'(i));
    repeat (2) @(posedge clk); rst_n = 1;
    for (int len = 0; len <= 6; len++) begin
      // chain: 100+10*len -> ... -> final word at 100+10*len+len
      int base = 100 + 10 * len;
      for (int k = 0; k < len; k++) mem[base + k] = mkword(T_BOUND, 2'b00, val_t'(base + k + 1));
      mem[base + len] = mkword(T_UNB, 2'b00, val_t'(base + len));
      if (len == 0) run(mem[base], 1'b0, '0, mem[base], 1);
      else          run(mkword(T_BOUND, 2'b00, val_t'(base + 1)) , 1'b0, '0, mem[base + len], len + 1);
      run('0, 1'b1, val_t'(base), mem[base + len], len + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
