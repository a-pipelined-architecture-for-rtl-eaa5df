// tb_ucode_rom: decodes one instruction of every class (and each partial
// unify action) and checks the fields of the control word that select what
// the instruction does.
module tb_ucode_rom;
  import libra_pkg::*;
  import libra_asm_pkg::*;
  word_t instr; uact_e pu_act; ctrl_t ctrl; logic [7:0] uaddr;
  int checks = 0, failures = 0;
  ucode_rom dut (.*);
  task automatic c(logic ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin
    pu_act = U_FAIL;
    instr = enc_imm(0, 3'd0, 1'b1, 3'd2, 5'd1, 3'd2, 5'd3, 16'h10); #1;
    c(ctrl.valid_op && ctrl.alu == A_SUB && ctrl.bsel == B_LIMM && ctrl.sc && ctrl.tag_imm && ctrl.gc_latch && ctrl.we_a && ctrl.wa == WA_R3IMM, "long imm sub sc");
    instr = movi(5'd4, 3'd2, 16'd9); #1;
    c(ctrl.alu == A_ADD && ctrl.bsel == B_SIMM && !ctrl.sc && !ctrl.gc_latch, "short imm add");
    instr = enc_reg(0, 3'd2, 1'b0, 3'd5, 1, 2, 3); #1;
    c(ctrl.alu == A_OR && ctrl.bsel == B_REG && ctrl.reg_fmt && !ctrl.tag_imm, "reg or");
    instr = enc_reg(0, 3'd3, 1'b0, 3'd2, 1, 0, 3); #1; c(ctrl.alu == A_SLL && ctrl.we_a, "sll");
    instr = enc_reg(0, 3'd3, 1'b0, 3'd4, 1, 0, 0); #1; c(ctrl.spec == SP_SAVPS && ctrl.res == RS_PS && ctrl.wa == WA_R1, "savps");
    instr = enc_reg(0, 3'd3, 1'b1, 3'd4, 1, 0, 0); #1; c(ctrl.spec == SP_RESTPS && !ctrl.we_a, "restorps");
    instr = enc_reg(0, 3'd3, 1'b0, 3'd5, 0, 0, 0); #1; c(ctrl.spec == SP_LDHI, "ldhi");
    instr = enc_reg(0, 3'd3, 1'b1, 3'd5, 0, 0, 0); #1; c(ctrl.spec == SP_SET, "set");
    instr = enc_reg(0, 3'd3, 1'b1, 3'd6, 0, 0, 0); #1; c(ctrl.spec == SP_CLEAR, "clear");
    instr = enc_reg(0, 3'd3, 1'b0, 3'd7, 0, 0, 0); #1; c(ctrl.spec == SP_LDGCHI, "ldgchi");
    instr = ld(1, 0, 2); #1; c(ctrl.mem == M_LOAD && ctrl.res == RS_MEM && ctrl.addr == AD_R1IMM, "ld");
    instr = drf(1, 2); #1; c(ctrl.deref == D_REG && ctrl.res == RS_DEREF, "drf");
    instr = enc_imm(0, 3'd4, 1'b1, 3'd1, 1, 0, 2, 4); #1; c(ctrl.deref == D_MEM && ctrl.sc, "drfmem sc");
    instr = st(1, 0, 2); #1; c(ctrl.mem == M_STORE && ctrl.wd == WD_R3, "st");
    instr = enc_imm(0, 3'd4, 1'b0, 3'd6, 1, 3, 0, 4); #1; c(ctrl.mem == M_STORE && ctrl.wd == WD_T3_IMM16 && ctrl.addr == AD_R1, "st t3:imm");
    instr = popm(1, 2); #1; c(ctrl.mem == M_LOAD && ctrl.ptr == P_PREDEC && ctrl.addr == AD_R1M1, "pop");
    instr = pushp(1, 2); #1; c(ctrl.mem == M_STORE && ctrl.ptr == P_POSTINC && ctrl.addr == AD_R1 && ctrl.wd == WD_R2, "push+");
    instr = pushldref(20, 1, 20, 0, 5); #1; c(ctrl.wd == WD_T2_R2 && ctrl.res == RS_REF && ctrl.we_a && ctrl.ptr == P_POSTINC, "push+&ldref");
    instr = enc_reg(0, 3'd6, 1'b0, 3'd1, 1, 0, 2); #1; c(ctrl.deref == D_MEM && ctrl.ptr == P_POSTINC, "pop+&drf");
    instr = goto_(29'd5); #1; c(ctrl.br == BR_ABS, "goto");
    instr = call_(29'd5); #1; c(ctrl.br == BR_CALL && ctrl.wa == WA_CP0 && ctrl.res == RS_PC1, "call");
    instr = ret_(2'd0); #1; c(ctrl.br == BR_RET, "ret");
    instr = switch_(1, 2, 3); #1; c(ctrl.br == BR_SWITCH, "switch");
    instr = if_(5'd1, 21'd7); #1; c(ctrl.br == BR_IF, "if");
    instr = enc_ctl(0, 1'b1, 3'd1, 29'd2); #1; c(ctrl.br == BR_TRAP, "trap0");
    instr = enc_ctl(0, 1'b1, 3'd5, 29'd2); #1; c(ctrl.br == BR_INDEXB, "indexboth");
    instr = lddpc(29'd2); #1; c(ctrl.valid_op && ctrl.tpl == TP_LDDPC && ctrl.br == BR_NONE, "lddpc");
    instr = hole();       #1; c(ctrl.valid_op && ctrl.tpl == TP_HOLE && !ctrl.we_a && ctrl.mem == M_NONE, "hole");
    instr = enc_reg(0, 3'd3, 1'b1, 3'd7, 1, 2, 3); #1; c(!ctrl.valid_op, "undefined");
    instr = unify(1, 2, 3'd2, 16'd9);
    pu_act = U_DEREF;   #1; c(ctrl.is_unify && ctrl.br == BR_DEREF && ctrl.sc && uaddr == 8'h80, "unify deref");
    pu_act = U_BIND_JS; #1; c(ctrl.mem == M_STORE && ctrl.addr == AD_JUNIOR && ctrl.wd == WD_REF_SENIOR, "unify js");
    pu_act = U_BIND_AB; #1; c(ctrl.mem == M_STORE && ctrl.addr == AD_AVAL && ctrl.wd == WD_BWORD, "unify ab");
    pu_act = U_BIND_BA; #1; c(ctrl.mem == M_STORE && ctrl.addr == AD_BVAL && ctrl.wd == WD_AWORD, "unify ba");
    pu_act = U_FAIL_NE; #1; c(ctrl.br == BR_FAIL_NE && ctrl.mem == M_NONE, "unify fail_ne");
    pu_act = U_FAIL;    #1; c(ctrl.br == BR_FAIL, "unify fail");
    pu_act = U_PRELOAD; #1; c(ctrl.br == BR_PAGE16, "unify preload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
