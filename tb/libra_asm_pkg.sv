// libra_asm_pkg: instruction encoders used by the LIBRA testbenches.
//
// Each function returns one 40-bit instruction word in the layout decoded by
// ucode_rom: [39:36] cond, [35:33] class, [32:29] type (type[2] = se),
// register format r1[28:24] r2[23:19] r3[18:14] t3[13:11] t2[10:8],
// immediate format r1[28:24] t3[23:21] r3[20:16] imm16[15:0].
package libra_asm_pkg;
  typedef logic [39:0] iw_t;

  function automatic logic [3:0] ty(logic [2:0] op3, logic se);
    return {op3[2], se, op3[1:0]};
  endfunction
  function automatic iw_t enc_reg(logic [3:0] c, logic [2:0] cls, logic se, logic [2:0] op3,
                                  logic [4:0] r1, logic [4:0] r2, logic [4:0] r3,
                                  logic [2:0] t3 = 3'd0, logic [2:0] t2 = 3'd0);
    return {c, cls, ty(op3, se), r1, r2, r3, t3, t2, 8'd0};
  endfunction
  function automatic iw_t enc_imm(logic [3:0] c, logic [2:0] cls, logic se, logic [2:0] op3,
                                  logic [4:0] r1, logic [2:0] t3, logic [4:0] r3, logic [15:0] imm);
    return {c, cls, ty(op3, se), r1, t3, r3, imm};
  endfunction
  function automatic iw_t enc_ctl(logic [3:0] c, logic se, logic [2:0] op3, logic [28:0] ops);
    return {c, 3'd7, ty(op3, se), ops};
  endfunction

  // common instructions (c = condition, 0 = always)
  function automatic iw_t movi(logic [4:0] rd, logic [2:0] tag, logic [15:0] v, logic [3:0] c = 0);
    return enc_imm(c, 3'd1, 1'b0, 3'd0, 5'd0, tag, rd, v);          // ADD r0, v, tag:rd
  endfunction
  function automatic iw_t cmp(logic [4:0] a, logic [4:0] b, logic [3:0] c = 0);
    return enc_reg(c, 3'd2, 1'b1, 3'd2, a, b, 5'd0);                 // SUB sc a, b, r0
  endfunction
  function automatic iw_t unify(logic [4:0] a, logic [4:0] b, logic [2:0] d, logic [15:0] p16, logic [3:0] c = 0);
    return enc_ctl(c, 1'b1, 3'd0, {a, b, d, p16});
  endfunction
  function automatic iw_t drf(logic [4:0] a, logic [4:0] rd, logic se = 0, logic [3:0] c = 0);
    return enc_reg(c, 3'd4, se, 3'd2, a, 5'd0, rd);
  endfunction
  function automatic iw_t ld(logic [4:0] a, logic [15:0] off, logic [4:0] rd, logic [3:0] c = 0);
    return enc_imm(c, 3'd4, 1'b0, 3'd0, a, 3'd0, rd, off);
  endfunction
  function automatic iw_t st(logic [4:0] a, logic [15:0] off, logic [4:0] rs, logic [3:0] c = 0);
    return enc_imm(c, 3'd4, 1'b0, 3'd4, a, 3'd0, rs, off);
  endfunction
  function automatic iw_t pushp(logic [4:0] p, logic [4:0] rs, logic [3:0] c = 0);   // PUSH+ p, rs
    return enc_reg(c, 3'd6, 1'b0, 3'd2, p, rs, 5'd0);
  endfunction
  function automatic iw_t popp(logic [4:0] p, logic [4:0] rd, logic [3:0] c = 0);    // POP+ p, rd
    return enc_reg(c, 3'd6, 1'b0, 3'd0, p, 5'd0, rd);
  endfunction
  function automatic iw_t popm(logic [4:0] p, logic [4:0] rd, logic [3:0] c = 0);    // POP (pre-decrement)
    return enc_reg(c, 3'd5, 1'b0, 3'd0, p, 5'd0, rd);
  endfunction
  function automatic iw_t pushldref(logic [4:0] p, logic [2:0] t2, logic [4:0] r2,
                                    logic [2:0] t3, logic [4:0] r3, logic [3:0] c = 0);
    return enc_reg(c, 3'd6, 1'b0, 3'd5, p, r2, r3, t3, t2);
  endfunction
  function automatic iw_t add(logic [4:0] a, logic [4:0] b, logic [4:0] rd, logic se = 0, logic [3:0] c = 0);
    return enc_reg(c, 3'd2, se, 3'd0, a, b, rd);
  endfunction
  function automatic iw_t goto_(logic [28:0] a, logic [3:0] c = 0);  return enc_ctl(c, 1'b0, 3'd1, a); endfunction
  function automatic iw_t call_(logic [28:0] a, logic [3:0] c = 0);  return enc_ctl(c, 1'b0, 3'd2, a); endfunction
  function automatic iw_t ret_(logic [1:0] id, logic [3:0] c = 0);   return enc_ctl(c, 1'b0, 3'd3, {27'd0, id}); endfunction
  function automatic iw_t switch_(logic [8:0] pc_, logic [8:0] pl, logic [8:0] ps, logic [3:0] c = 0);
    return enc_ctl(c, 1'b0, 3'd4, {2'b00, pc_, pl, ps});
  endfunction
  function automatic iw_t if_(logic [4:0] cond5, logic [20:0] p21, logic [3:0] c = 0);
    return enc_ctl(c, 1'b0, 3'd5, {3'b000, cond5, p21});
  endfunction
  function automatic iw_t lddpc(logic [28:0] a, logic [3:0] c = 0); return enc_ctl(c, 1'b1, 3'd6, a); endfunction
  function automatic iw_t hole(logic [3:0] c = 0);                  return enc_ctl(c, 1'b1, 3'd7, 29'd0); endfunction
endpackage
