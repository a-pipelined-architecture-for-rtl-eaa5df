// libra_core: the LIBRA processor pipeline.
//
// A 40-bit tagged processor for Prolog with a complex but single-cycle
// instruction set: every instruction, including partial unify, push-and-load-
// reference and pop-and-dereference, spends one cycle in execute; only a
// dereference that must follow references through memory holds the pipeline.
//
// Pipeline (4 stages, as the architecture states):
//   F  fetch: the PC addresses instruction memory (synchronous, one cycle).
//   D  decode: one control word per instruction from ucode_rom; for partial
//      unify the address comes from the tag pair latched by the last
//      condition-setting instruction (pu_map_rom). An sc instruction in E
//      forwards its tag pair, so "compare; unify" needs no stall. Registers
//      are read here (write-through from W).
//   E  execute: condition check (cond_logic) - a false condition turns the
//      instruction into a no-op; value, tag and GC ALUs; address generation and
//      the data-memory access; PC ALU (ialu) resolves branches, which flush F
//      and D (two-cycle penalty); dereference unit (stall while walking).
//      Operands are forwarded from W.
//   W  write back: up to two registers (destination and stack pointer); for
//      loads and dereferences the trail check is done and the result stored in
//      the trail-check scoreboard.
// Status (PS, 24 bits): Z N C, bound1/2, trail1/2, env1/2, sticky overflow,
// tags-equal, latched tags A and B, var. Written by sc instructions, SET,
// CLEAR and RESTORPS; the overflow bit is set whenever H >= SLIM or TR >= TLIM.
// Memories: both ports use the one-cycle synchronous protocol of
// interleaved_mem (en, we, addr, wdata; rdata valid the next cycle).
// Template execution (template_pc): a HOLE instruction in E redirects fetch
// to the difference PC; the instruction fetched there runs in place of the
// hole and fetch then continues after the hole.
// The ev_* outputs pulse once per event, for statistics.
// Own choices are listed in the comments of the submodules; here: operand
// forwarding from W only, flags of a dereferencing sc instruction describe the
// dereferenced word, and the junior of two variables is the higher address.
module libra_core
  import libra_pkg::*;
#(
  parameter int unsigned IAW = 14,   // instruction memory address bits
  parameter int unsigned DAW = 14    // data memory address bits
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory
  output logic            imem_en,
  output logic [IAW-1:0]  imem_addr,
  input  word_t           imem_rdata,
  // data memory
  output logic            dmem_en,
  output logic            dmem_we,
  output logic [DAW-1:0]  dmem_addr,
  output word_t           dmem_wdata,
  input  word_t           dmem_rdata,
  // state for observation
  output logic [PS_W-1:0] ps_o,
  output pc_t             e_pc_o,
  output logic            self_loop,   // executing a GOTO to its own address
  output logic            ev_retire,
  output logic            ev_squash,
  output logic            ev_stall,
  output logic            ev_redirect,
  output logic            ev_fwd,
  output logic            ev_unify,
  output uact_e           ev_unify_act,
  output logic            ev_trail_set,
  output logic            ev_ovf,
  output logic            ev_hole
);
  // ---------------------------------------------------------------- state
  pc_t   pc_f, pc_d;
  logic  d_valid;
  logic  [PS_W-1:0] ps;
  logic  [18:0] hi19;

  // E stage registers
  logic   e_valid;
  pc_t    e_pc;
  word_t  e_ir;
  ctrl_t  e_ctrl;
  word_t  e_a, e_b2, e_c;
  logic [4:0] e_ra1, e_ra2, e_ra3, e_wa;
  logic   e_sb1, e_sb2;
  uact_e  e_act;

  // W stage registers
  logic       w_we_a, w_we_b, w_from_mem, w_chk;
  logic [4:0] w_wa_a, w_wa_b;
  word_t      w_a_val, w_b_val;

  // forwarded operands of the E stage
  word_t a_w, b2_w, c_w;
  logic  sb1_f, sb2_f;

  // ---------------------------------------------------------------- hazards
  logic stall, redirect;
  pc_t  br_target;
  logic tp_ret_pend;
  pc_t  tp_ret_pc;

  // ---------------------------------------------------------------- fetch
  assign imem_en   = !stall;
  assign imem_addr = pc_f[IAW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f <= '0; pc_d <= '0; d_valid <= 1'b0;
    end else if (redirect) begin
      pc_f <= br_target; d_valid <= 1'b0;
    end else if (!stall) begin
      pc_f <= tp_ret_pend ? tp_ret_pc : pc_t'(pc_f + 1'b1); pc_d <= pc_f; d_valid <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- decode
  word_t d_ir;
  ctrl_t d_ctrl;
  uact_e d_act;
  logic [7:0] d_uaddr;
  logic [2:0] eff_ta, eff_tb;
  logic [2:0] e_new_ta, e_new_tb;
  logic       e_fire, e_sets_tags;
  logic [4:0] d_ra1, d_ra2, d_ra3, d_wa;
  word_t d_rd1, d_rd2, d_rd3;
  logic  d_sb1, d_sb2;
  word_t rf_regs [32];

  assign d_ir   = imem_rdata;
  assign eff_ta = e_sets_tags ? e_new_ta : ps[PS_TA +: 3];
  assign eff_tb = e_sets_tags ? e_new_tb : ps[PS_TB +: 3];

  pu_map_rom u_pumap (.tag_a(eff_ta), .tag_b(eff_tb), .act(d_act));
  ucode_rom  u_urom  (.instr(d_ir), .pu_act(d_act), .ctrl(d_ctrl), .uaddr(d_uaddr));

  always_comb begin
    d_ra1 = f_r1(d_ir);
    d_ra2 = (d_ctrl.br == BR_RET) ? {3'b111, d_ir[1:0]} : f_r2(d_ir);
    d_ra3 = d_ctrl.reg_fmt ? f_r3reg(d_ir) : f_r3imm(d_ir);
    unique case (d_ctrl.wa)
      WA_R3REG: d_wa = f_r3reg(d_ir);
      WA_R3IMM: d_wa = f_r3imm(d_ir);
      WA_CP0:   d_wa = R_CP0;
      WA_R1:    d_wa = f_r1(d_ir);
      default:  d_wa = f_r3reg(d_ir);
    endcase
  end

  // W-stage write data
  word_t w_a_data;
  logic  w_sb_val;
  assign w_a_data = w_from_mem ? dmem_rdata : w_a_val;

  regfile u_rf (
    .clk, .rst_n,
    .ra1(d_ra1), .ra2(d_ra2), .ra3(d_ra3), .rd1(d_rd1), .rd2(d_rd2), .rd3(d_rd3),
    .we_a(w_we_a), .wa_a(w_wa_a), .wd_a(w_a_data),
    .we_b(w_we_b), .wa_b(w_wa_b), .wd_b(w_b_val),
    .regs(rf_regs));

  trail_scoreboard u_sb (
    .clk, .rst_n,
    .set_we(w_we_a), .set_idx(w_wa_a), .set_val(w_sb_val),
    .clr_we(w_we_b), .clr_idx(w_wa_b),
    .ra1(d_ra1), .ra2(d_ra2), .sb1(d_sb1), .sb2(d_sb2));

  // ---------------------------------------------------------------- D -> E
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0; e_pc <= '0; e_ir <= '0; e_ctrl <= CTRL_NOP;
      e_a <= '0; e_b2 <= '0; e_c <= '0; e_ra1 <= '0; e_ra2 <= '0; e_ra3 <= '0; e_wa <= '0;
      e_sb1 <= 1'b0; e_sb2 <= 1'b0; e_act <= U_FAIL;
    end else if (stall) begin
      // hold the instruction, but keep its operands current with W
      e_a <= a_w; e_b2 <= b2_w; e_c <= c_w; e_sb1 <= sb1_f; e_sb2 <= sb2_f;
    end else begin
      e_valid <= d_valid && !redirect;
      e_pc <= pc_d; e_ir <= d_ir; e_ctrl <= d_ctrl; e_act <= d_act;
      e_a <= d_rd1; e_b2 <= d_rd2; e_c <= d_rd3;
      e_ra1 <= d_ra1; e_ra2 <= d_ra2; e_ra3 <= d_ra3; e_wa <= d_wa;
      e_sb1 <= d_sb1; e_sb2 <= d_sb2;
    end
  end

  // ---------------------------------------------------------------- execute

  function automatic logic hit(logic we, logic [4:0] wa, logic [4:0] ra);
    return we && (wa == ra) && (ra != R_ZERO);
  endfunction

  always_comb begin
    a_w  = hit(w_we_a, w_wa_a, e_ra1) ? w_a_data : hit(w_we_b, w_wa_b, e_ra1) ? w_b_val : e_a;
    b2_w = hit(w_we_a, w_wa_a, e_ra2) ? w_a_data : hit(w_we_b, w_wa_b, e_ra2) ? w_b_val : e_b2;
    c_w  = hit(w_we_a, w_wa_a, e_ra3) ? w_a_data : hit(w_we_b, w_wa_b, e_ra3) ? w_b_val : e_c;
    sb1_f = hit(w_we_a, w_wa_a, e_ra1) ? w_sb_val : hit(w_we_b, w_wa_b, e_ra1) ? 1'b0 : e_sb1;
    sb2_f = hit(w_we_a, w_wa_a, e_ra2) ? w_sb_val : hit(w_we_b, w_wa_b, e_ra2) ? 1'b0 : e_sb2;
  end
  assign ev_fwd = e_valid && (hit(w_we_a, w_wa_a, e_ra1) || hit(w_we_a, w_wa_a, e_ra2) ||
                              hit(w_we_a, w_wa_a, e_ra3) || hit(w_we_b, w_wa_b, e_ra1) ||
                              hit(w_we_b, w_wa_b, e_ra2) || hit(w_we_b, w_wa_b, e_ra3));

  // condition
  logic cond_pass, e_exec;
  cond_logic u_cond (.cond({1'b0, f_cond(e_ir)}), .ps(ps), .pass(cond_pass));
  assign e_exec = e_valid && cond_pass && e_ctrl.valid_op;

  // operands
  logic [15:0] imm16;
  val_t  a_val, b_val, simm, limm;
  logic [2:0] t3, tag_b_in;
  assign imm16 = f_imm16(e_ir);
  assign simm  = {{(VAL_W-16){imm16[15]}}, imm16};
  assign limm  = {hi19, imm16};
  assign a_val = w_val(a_w);
  always_comb begin
    unique case (e_ctrl.bsel)
      B_REG:   b_val = w_val(b2_w);
      B_LIMM:  b_val = limm;
      B_SIMM:  b_val = simm;
      default: b_val = '0;
    endcase
  end
  assign t3       = e_ctrl.reg_fmt ? f_t3reg(e_ir) : f_t3imm(e_ir);
  assign tag_b_in = (e_ctrl.bsel == B_REG) ? w_tag(b2_w) : t3;

  // value ALU
  val_t alu_y;
  logic alu_c, alu_z, alu_n;
  value_alu u_valu (.op(e_ctrl.alu), .a(a_val), .b(b_val), .cin(ps[PS_C]),
                    .y(alu_y), .cout(alu_c), .z(alu_z), .n(alu_n));

  // tag ALU
  logic [2:0] tag_y;
  logic teq, bnd_a, bnd_b, unb_a, unb_b;
  logic [5:0] alt_uaddr;
  logic [2:0] fa_tag;
  word_t fa_word;
  tag_alu u_talu (.tag_a(fa_tag), .tag_b(tag_b_in), .tag_imm(t3), .use_imm(e_ctrl.tag_imm),
                  .tag_y(tag_y), .teq(teq), .bound_a(bnd_a), .bound_b(bnd_b),
                  .unb_a(unb_a), .unb_b(unb_b), .alt_uaddr(alt_uaddr));

  // GC ALU
  logic [1:0] gc_y, gc_latch_q;
  logic mark_a, rev_a;
  logic ldgc;
  assign ldgc = e_fire && (e_ctrl.spec == SP_LDGC || e_ctrl.spec == SP_LDGCHI);
  gc_alu u_galu (.clk, .rst_n, .ldgc(ldgc), .gc_imm(e_ir[20:19]), .gc_a(w_gc(a_w)),
                 .use_latch(e_ctrl.gc_latch), .gc_y(gc_y), .mark_a(mark_a), .rev_a(rev_a),
                 .gc_latch_q(gc_latch_q));

  // address generation
  val_t addr, slot, ptr_new, junior, senior;
  assign junior = (a_val > b_val) ? a_val : b_val;
  assign senior = (a_val > b_val) ? b_val : a_val;
  assign slot   = (e_ctrl.ptr == P_PREDEC) ? a_val - 1'b1 : a_val;
  assign ptr_new = (e_ctrl.ptr == P_PREDEC) ? a_val - 1'b1 : a_val + 1'b1;
  always_comb begin
    unique case (e_ctrl.addr)
      AD_R1IMM:  addr = a_val + simm;
      AD_R1:     addr = a_val;
      AD_R1M1:   addr = a_val - 1'b1;
      AD_AVAL:   addr = a_val;
      AD_BVAL:   addr = b_val;
      AD_JUNIOR: addr = junior;
      default:   addr = a_val;
    endcase
  end

  // store data
  word_t wdata;
  always_comb begin
    unique case (e_ctrl.wd)
      WD_R3:         wdata = c_w;
      WD_R3_T3:      wdata = {t3, c_w[36:0]};
      WD_T3_IMM16, WD_T3_IMM16P: wdata = mkword(t3, 2'b00, val_t'(imm16));
      WD_R2:         wdata = b2_w;
      WD_R2_T3:      wdata = {t3, b2_w[36:0]};
      WD_T2_R2:      wdata = {f_t2reg(e_ir), b2_w[36:0]};
      WD_T2_IMM13:   wdata = mkword(e_ir[15:13], 2'b00, val_t'(e_ir[12:0]));
      WD_BWORD:      wdata = b2_w;
      WD_AWORD:      wdata = a_w;
      WD_REF_SENIOR: wdata = mkword(T_BOUND, 2'b00, senior);
      default:       wdata = c_w;
    endcase
  end

  // dereference unit
  logic  dr_start, dr_req, dr_busy, dr_done;
  val_t  dr_addr;
  word_t dr_result;
  logic [15:0] dr_hops;
  assign dr_start = e_exec && (e_ctrl.deref != D_NONE);
  deref_unit u_deref (.clk, .rst_n, .start(dr_start), .from_mem(e_ctrl.deref == D_MEM),
                      .word(a_w), .addr(addr), .mem_rdata(dmem_rdata),
                      .mem_req(dr_req), .mem_addr(dr_addr), .busy(dr_busy), .done(dr_done),
                      .result(dr_result), .hops(dr_hops));

  assign stall  = dr_busy;
  assign e_fire = e_exec && !dr_busy;

  // flag operand A: for dereferencing instructions, the dereferenced word
  assign fa_word = (e_ctrl.deref != D_NONE) ? dr_result : a_w;
  assign fa_tag  = w_tag(fa_word);

  // bounds checks for env1/env2
  logic env1, env2, tr_unused1, tr_unused2, h_ovf, t_ovf, ho_u, to_u;
  bounds_check u_bc_a (.v(w_val(fa_word)), .hb(w_val(rf_regs[R_HB])), .eb(w_val(rf_regs[R_EB])),
                       .slim(w_val(rf_regs[R_SLIM])), .tlim(w_val(rf_regs[R_TLIM])),
                       .e(w_val(rf_regs[R_E])), .h(w_val(rf_regs[R_H])), .tr(w_val(rf_regs[R_TR])),
                       .trail(tr_unused1), .env(env1), .h_ovf(h_ovf), .t_ovf(t_ovf));
  bounds_check u_bc_b (.v(b_val), .hb(w_val(rf_regs[R_HB])), .eb(w_val(rf_regs[R_EB])),
                       .slim(w_val(rf_regs[R_SLIM])), .tlim(w_val(rf_regs[R_TLIM])),
                       .e(w_val(rf_regs[R_E])), .h(w_val(rf_regs[R_H])), .tr(w_val(rf_regs[R_TR])),
                       .trail(tr_unused2), .env(env2), .h_ovf(ho_u), .t_ovf(to_u));

  // trail flags: the scoreboard bit of an unbound operand; a unify that binds
  // the junior variable leaves the senior one alone
  logic t1_flag, t2_flag, a_senior;
  assign a_senior = !(a_val > b_val);
  assign t1_flag = sb1_f && unb_a && !(e_ctrl.is_unify && e_act == U_BIND_JS && a_senior);
  assign t2_flag = sb2_f && unb_b && !(e_ctrl.is_unify && e_act == U_BIND_JS && !a_senior);

  assign e_sets_tags = e_valid && e_exec && e_ctrl.sc;
  assign e_new_ta = fa_tag;
  assign e_new_tb = tag_b_in;

  // PC ALU
  logic [4:0] bit_id;
  logic       bit_ok;
  assign bit_id = e_ir[25:21];
  assign bit_ok = (bit_id < 5'(PS_W));
  logic br_take, if_pass;
  pc_t  ialu_target, tp_target, tp_dpc;
  logic tp_hole;
  cond_logic u_ifcond (.cond(e_ir[25:21]), .ps(ps), .pass(if_pass));
  ialu u_ialu (.br(e_ctrl.br), .pc(e_pc), .ops(e_ir[28:0]), .tag_a(ps[PS_TA +: 3]),
               .tag_b(ps[PS_TB +: 3]), .if_pass(if_pass), .bit_set(bit_ok && ps[bit_id[$clog2(PS_W)-1:0]]),
               .vals_eq(a_val == b_val), .ret_addr(pc_t'(w_val(b2_w))),
               .take(br_take), .target(ialu_target));
  // template and difference program counters: HOLE branches to the
  // difference PC, and fetch returns to the template by itself
  assign tp_hole   = e_fire && (e_ctrl.tpl == TP_HOLE);
  template_pc u_tpc (.clk, .rst_n,
                     .ld_dpc(e_fire && (e_ctrl.tpl == TP_LDDPC)), .ld_val(pc_t'(e_ir[28:0])),
                     .hole(tp_hole), .hole_pc(e_pc),
                     .advance(!stall && !redirect), .redirect_other(redirect && !tp_hole),
                     .hole_target(tp_target), .ret_pend(tp_ret_pend), .ret_pc(tp_ret_pc), .dpc(tp_dpc));
  assign redirect  = e_fire && (br_take || tp_hole);
  assign br_target = tp_hole ? tp_target : ialu_target;

  // PS and latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= '0; hi19 <= '0;
    end else begin
      if (e_fire && e_ctrl.sc) begin
        if (!e_ctrl.is_unify) begin
          ps[PS_Z] <= alu_z; ps[PS_N] <= alu_n; ps[PS_C] <= alu_c;
        end
        ps[PS_B1] <= bnd_a;  ps[PS_B2] <= bnd_b;
        ps[PS_T1] <= t1_flag; ps[PS_T2] <= t2_flag;
        ps[PS_E1] <= env1;   ps[PS_E2] <= env2;
        ps[PS_TEQ] <= teq;   ps[PS_VAR] <= unb_a;
        ps[PS_TA +: 3] <= alt_uaddr[5:3];
        ps[PS_TB +: 3] <= alt_uaddr[2:0];
      end
      if (e_fire && e_ctrl.spec == SP_SET && bit_ok)   ps[bit_id[$clog2(PS_W)-1:0]] <= 1'b1;
      if (e_fire && e_ctrl.spec == SP_CLEAR && bit_ok) ps[bit_id[$clog2(PS_W)-1:0]] <= 1'b0;
      if (e_fire && e_ctrl.spec == SP_RESTPS) ps <= a_val[PS_W-1:0];
      if (h_ovf || t_ovf) ps[PS_OVF] <= 1'b1;
      if (e_fire && (e_ctrl.spec == SP_LDHI || e_ctrl.spec == SP_LDGCHI)) hi19 <= e_ir[18:0];
    end
  end

  // data memory port: the dereference unit has it while it walks
  always_comb begin
    dmem_en = 1'b0; dmem_we = 1'b0; dmem_addr = addr[DAW-1:0]; dmem_wdata = wdata;
    if (dr_req) begin
      dmem_en = 1'b1; dmem_addr = dr_addr[DAW-1:0];
    end else if (e_fire && e_ctrl.mem != M_NONE) begin
      dmem_en = 1'b1; dmem_we = (e_ctrl.mem == M_STORE);
    end
  end

  // result for port A
  word_t res_a;
  always_comb begin
    unique case (e_ctrl.res)
      RS_ALU:    res_a = {tag_y, gc_y, alu_y};
      RS_DEREF:  res_a = dr_result;
      RS_REF:    res_a = mkword(t3, 2'b00, slot);
      RS_R1WORD: res_a = {w_tag(a_w), w_gc(a_w), slot};
      RS_PC1:    res_a = mkword(T_INT, 2'b00, val_t'(pc_t'(e_pc + 1'b1)));
      RS_PS:     res_a = mkword(T_INT, 2'b00, val_t'(ps));
      default:   res_a = '0;
    endcase
  end

  // ---------------------------------------------------------------- E -> W
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_we_a <= 1'b0; w_we_b <= 1'b0; w_from_mem <= 1'b0; w_chk <= 1'b0;
      w_wa_a <= '0; w_wa_b <= '0; w_a_val <= '0; w_b_val <= '0;
    end else begin
      w_we_a     <= e_fire && e_ctrl.we_a;
      w_wa_a     <= e_wa;
      w_a_val    <= res_a;
      w_from_mem <= (e_ctrl.res == RS_MEM);
      w_chk      <= (e_ctrl.res == RS_MEM) || (e_ctrl.res == RS_DEREF);
      w_we_b     <= e_fire && (e_ctrl.ptr != P_NONE);
      w_wa_b     <= e_ra1;
      w_b_val    <= {w_tag(a_w), w_gc(a_w), ptr_new};
    end
  end

  // ---------------------------------------------------------------- write back
  logic w_trail, w_env_u, w_ho_u, w_to_u;
  bounds_check u_bc_w (.v(w_val(w_a_data)), .hb(w_val(rf_regs[R_HB])), .eb(w_val(rf_regs[R_EB])),
                       .slim(w_val(rf_regs[R_SLIM])), .tlim(w_val(rf_regs[R_TLIM])),
                       .e(w_val(rf_regs[R_E])), .h(w_val(rf_regs[R_H])), .tr(w_val(rf_regs[R_TR])),
                       .trail(w_trail), .env(w_env_u), .h_ovf(w_ho_u), .t_ovf(w_to_u));
  assign w_sb_val = w_chk && (w_tag(w_a_data) == T_UNB) && w_trail;

  // ---------------------------------------------------------------- observation
  assign ps_o         = ps;
  assign e_pc_o       = e_pc;
  assign self_loop    = e_fire && e_ctrl.br == BR_ABS && e_ir[28:0] == e_pc;
  assign ev_retire    = e_fire;
  assign ev_squash    = e_valid && !cond_pass && !stall;
  assign ev_stall     = stall;
  assign ev_redirect  = redirect;
  assign ev_unify     = e_fire && e_ctrl.is_unify;
  assign ev_unify_act = e_act;
  assign ev_trail_set = w_we_a && w_sb_val;
  assign ev_ovf       = (h_ovf || t_ovf) && !ps[PS_OVF];
  assign ev_hole      = tp_hole;
endmodule
