// ucode_rom: instruction decode PLA and control-word ROM of the LIBRA.
//
// The LIBRA is microcoded with exactly one control word per machine
// instruction. Decode forms a microprogram address from the opcode,
// uaddr = {0, class, se, op3}; for a partial unify instruction the address
// formed from the latched operand tags is used instead, uaddr = {1, 0000, act},
// where act comes from the partial unify mapping ROM. The control word read at
// that address drives the value, tag, GC and PC ALUs for the one cycle the
// instruction spends in execute, so partial unify literally becomes a store, a
// branch or a no-op. Combinational.
//
// Instruction word (own layout, fitted to the operand lists of the
// instruction set): [39:36] cond, [35:33] class, [32:29] type with type[2] =
// se. Register format: r1[28:24] r2[23:19] r3[18:14] t3[13:11] t2[10:8].
// Immediate format: r1[28:24] t3[23:21] r3[20:16] imm16[15:0] (PUSH & LDREF
// with an immediate: t2[15:13] imm13[12:0]). In the shift/control class and
// the execution-control class the se half of the opcode table holds different
// instructions (RESTORPS, SET, CLEAR, TRAP0, TRAPCALL, INDEX...), so se there
// selects the instruction instead of setting the condition codes.
// The two free codes of the se half of class 111 hold LDDPC Absolute29 (load
// the difference PC) and HOLE (fill a template hole from the difference
// stream); their placement is this design's own.
module ucode_rom
  import libra_pkg::*;
(
  input  word_t      instr,
  input  uact_e      pu_act,
  output ctrl_t      ctrl,
  output logic [7:0] uaddr
);
  logic is_unify_op;
  assign is_unify_op = (f_class(instr) == C_CTRL) && (f_op3(instr) == 3'd0);
  assign uaddr = is_unify_op ? {5'b1_0000, pu_act} : {1'b0, f_class(instr), f_se(instr), f_op3(instr)};

  function automatic aluop_e arith(logic [2:0] op);
    unique case (op)
      3'd0: return A_ADD;  3'd1: return A_ADDC; 3'd2: return A_SUB; 3'd3: return A_SUBC;
      3'd4: return A_AND;  3'd5: return A_OR;   3'd6: return A_XOR;
      default: return A_ADD;
    endcase
  endfunction

  function automatic ctrl_t rom(logic [7:0] a);
    ctrl_t c;
    logic [2:0] cls, op;
    logic se;
    c = CTRL_NOP;
    cls = a[6:4]; se = a[3]; op = a[2:0];
    if (a[7]) begin
      c.valid_op = 1'b1; c.is_unify = 1'b1;
      unique case (uact_e'(a[2:0]))
        U_DEREF:   c.br = BR_DEREF;
        U_BIND_JS: begin c.mem = M_STORE; c.addr = AD_JUNIOR; c.wd = WD_REF_SENIOR; end
        U_BIND_AB: begin c.mem = M_STORE; c.addr = AD_AVAL;   c.wd = WD_BWORD; end
        U_BIND_BA: begin c.mem = M_STORE; c.addr = AD_BVAL;   c.wd = WD_AWORD; end
        U_FAIL_NE: c.br = BR_FAIL_NE;
        U_FAIL:    c.br = BR_FAIL;
        U_PRELOAD: c.br = BR_PAGE16;
        default:   c.valid_op = 1'b0;
      endcase
      return c;
    end
    unique case (class_e'(cls))
      C_LIMM, C_SIMM, C_REG: if (op != 3'd7) begin
        c.valid_op = 1'b1; c.sc = se; c.alu = arith(op); c.we_a = 1'b1; c.res = RS_ALU;
        if (class_e'(cls) == C_REG) begin c.bsel = B_REG; c.reg_fmt = 1'b1; c.wa = WA_R3REG; end
        else begin
          c.bsel = (class_e'(cls) == C_LIMM) ? B_LIMM : B_SIMM;
          c.reg_fmt = 1'b0; c.tag_imm = 1'b1; c.wa = WA_R3IMM;
          c.gc_latch = (class_e'(cls) == C_LIMM);
        end
      end
      C_SHIFT: begin
        c.valid_op = 1'b1;
        unique case (op)
          3'd0, 3'd1, 3'd2: begin
            c.sc = se; c.we_a = 1'b1; c.res = RS_ALU; c.wa = WA_R3REG;
            c.alu = (op == 3'd0) ? A_SRA : (op == 3'd1) ? A_SLA : A_SLL;
          end
          3'd4: if (se) c.spec = SP_RESTPS;
                else begin c.spec = SP_SAVPS; c.we_a = 1'b1; c.res = RS_PS; c.wa = WA_R1; end
          3'd5: c.spec = se ? SP_SET   : SP_LDHI;
          3'd6: c.spec = se ? SP_CLEAR : SP_LDGC;
          3'd7: if (!se) c.spec = SP_LDGCHI; else c.valid_op = 1'b0;
          default: c.valid_op = 1'b0;
        endcase
      end
      C_LDST: begin
        c.valid_op = 1'b1; c.sc = se;
        unique case (op)
          3'd0: begin c.reg_fmt = 1'b0; c.mem = M_LOAD; c.addr = AD_R1IMM; c.we_a = 1'b1; c.res = RS_MEM; c.wa = WA_R3IMM; end
          3'd1: begin c.reg_fmt = 1'b0; c.deref = D_MEM; c.addr = AD_R1IMM; c.we_a = 1'b1; c.res = RS_DEREF; c.wa = WA_R3IMM; end
          3'd2: begin c.deref = D_REG; c.we_a = 1'b1; c.res = RS_DEREF; c.wa = WA_R3REG; end
          3'd4: begin c.reg_fmt = 1'b0; c.mem = M_STORE; c.addr = AD_R1IMM; c.wd = WD_R3; end
          3'd5: begin c.reg_fmt = 1'b0; c.mem = M_STORE; c.addr = AD_R1IMM; c.wd = WD_R3_T3; end
          3'd6: begin c.reg_fmt = 1'b0; c.mem = M_STORE; c.addr = AD_R1;    c.wd = WD_T3_IMM16; end
          default: c.valid_op = 1'b0;
        endcase
      end
      C_PRED, C_POST: begin
        c.valid_op = 1'b1; c.sc = se;
        c.ptr  = (class_e'(cls) == C_PRED) ? P_PREDEC : P_POSTINC;
        c.addr = (class_e'(cls) == C_PRED) ? AD_R1M1  : AD_R1;
        unique case (op)
          3'd0: begin c.mem = M_LOAD; c.we_a = 1'b1; c.res = RS_MEM; c.wa = WA_R3REG; end
          3'd1: begin c.deref = D_MEM; c.we_a = 1'b1; c.res = RS_DEREF; c.wa = WA_R3REG; end
          3'd2: begin c.mem = M_STORE; c.wd = WD_R2; end
          3'd3: begin c.mem = M_STORE; c.wd = WD_R2_T3; end
          3'd4: begin c.reg_fmt = 1'b0; c.mem = M_STORE; c.wd = WD_T3_IMM16P; c.we_a = 1'b1; c.res = RS_R1WORD; c.wa = WA_R3IMM; end
          3'd5: begin c.mem = M_STORE; c.wd = WD_T2_R2; c.we_a = 1'b1; c.res = RS_REF; c.tag_imm = 1'b1; c.wa = WA_R3REG; end
          3'd6: begin c.reg_fmt = 1'b0; c.mem = M_STORE; c.wd = WD_T2_IMM13; c.we_a = 1'b1; c.res = RS_REF; c.tag_imm = 1'b1; c.wa = WA_R3IMM; end
          default: c.valid_op = 1'b0;
        endcase
      end
      C_CTRL: begin
        c.valid_op = 1'b1;
        if (!se) unique case (op)
          3'd1: c.br = BR_ABS;
          3'd2: begin c.br = BR_CALL; c.we_a = 1'b1; c.res = RS_PC1; c.wa = WA_CP0; end
          3'd3: c.br = BR_RET;
          3'd4: c.br = BR_SWITCH;
          3'd5, 3'd6: c.br = BR_IF;
          3'd7: c.br = BR_IFBIT;
          default: c.valid_op = 1'b0;
        endcase
        else unique case (op)
          3'd1: c.br = BR_TRAP;
          3'd2: begin c.br = BR_TRAPCALL; c.we_a = 1'b1; c.res = RS_PC1; c.wa = WA_CP0; end
          3'd3: c.br = BR_INDEX1;
          3'd4: c.br = BR_INDEX2;
          3'd5: c.br = BR_INDEXB;
          3'd6: c.tpl = TP_LDDPC;
          3'd7: c.tpl = TP_HOLE;
          default: c.valid_op = 1'b0;
        endcase
      end
      default: c.valid_op = 1'b0;
    endcase
    return c;
  endfunction

  always_comb begin
    ctrl = rom(uaddr);
    if (is_unify_op) ctrl.sc = f_se(instr);
  end
endmodule
