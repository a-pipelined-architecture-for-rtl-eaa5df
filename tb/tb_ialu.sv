// tb_ialu: directed checks of every branch kind of the PC ALU: page
// replacement widths, SWITCH per tag class, IF, INDEX, traps, unify branches.
module tb_ialu;
  import libra_pkg::*;
  br_e br; pc_t pc, ret_addr, target; logic [28:0] ops; logic [2:0] tag_a, tag_b;
  logic if_pass, bit_set, vals_eq, take;
  int checks = 0, failures = 0;
  ialu dut (.*);
  task automatic c(br_e b, logic et, pc_t ett, string s);
    br = b; #1; checks++;
    if (take !== et || (et && target !== ett)) begin
      failures++; $display("FAIL %s take=%b target=%h exp %b %h", s, take, target, et, ett);
    end
  endtask
  initial begin
    pc = 29'h0ABC_DEF1; ret_addr = 29'h123; tag_a = 0; tag_b = 0; if_pass = 0; bit_set = 0; vals_eq = 1;
    ops = 29'h1555_5555;
    c(BR_NONE, 0, 0, "none");
    c(BR_ABS, 1, 29'h1555_5555, "abs");
    c(BR_CALL, 1, 29'h1555_5555, "call");
    c(BR_RET, 1, 29'h123, "ret");
    ops = {2'b00, 9'h011, 9'h022, 9'h033};
    tag_a = T_INT;    c(BR_SWITCH, 1, {pc[28:9], 9'h011}, "switch int");
    tag_a = T_SYM;    c(BR_SWITCH, 1, {pc[28:9], 9'h011}, "switch sym");
    tag_a = T_LIST2;  c(BR_SWITCH, 1, {pc[28:9], 9'h022}, "switch list");
    tag_a = T_STRUC1; c(BR_SWITCH, 1, {pc[28:9], 9'h033}, "switch struc");
    tag_a = T_UNB;    c(BR_SWITCH, 0, 0, "switch var");
    tag_a = T_BOUND;  c(BR_SWITCH, 0, 0, "switch ref");
    ops = 29'h0_1F_ABCD;
    if_pass = 0; c(BR_IF, 0, 0, "if false");
    if_pass = 1; c(BR_IF, 1, {pc[28:21], 21'h1F_ABCD}, "if true");
    bit_set = 1; c(BR_IFBIT, 1, {pc[28:21], 21'h1F_ABCD}, "ifbit");
    bit_set = 0; c(BR_IFBIT, 0, 0, "ifbit clear");
    ops = 29'h100; tag_a = 3'd5; tag_b = 3'd6;
    c(BR_INDEX1, 1, {pc[28:21], 21'h105}, "index1");
    c(BR_INDEX2, 1, {pc[28:21], 21'h106}, "index2");
    c(BR_INDEXB, 1, {pc[28:21], 21'h12E}, "indexb");
    ops = 29'h3; c(BR_TRAP, 1, 29'h430, "trap3");
    c(BR_TRAPCALL, 1, 29'h430, "trapcall3");
    ops = {5'd1, 5'd2, 3'd3, 16'hBEEF};
    c(BR_PAGE16, 1, {pc[28:16], 16'hBEEF}, "page16");
    c(BR_DEREF, 1, pc - 3, "deref -3");
    ops = {5'd1, 5'd2, 3'd0, 16'hBEEF}; c(BR_DEREF, 1, pc - 8, "deref -8");
    c(BR_FAIL, 1, 29'h400, "fail");
    vals_eq = 1; c(BR_FAIL_NE, 0, 0, "fail_ne eq");
    vals_eq = 0; c(BR_FAIL_NE, 1, 29'h400, "fail_ne ne");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
