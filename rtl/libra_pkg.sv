// libra_pkg: types and constants shared by the LIBRA processor.
//
// The LIBRA is a 40-bit tagged processor for Prolog. Every data word is
// {type[2:0], mark, reverse, value[34:0]}; the split (3 + 1 + 1 + 35) follows
// the architecture description. The numeric encodings below (tag codes,
// condition codes, instruction field positions, register numbers, status
// bits) are not published with the architecture and are this design's own
// choices; they are documented next to each definition.
package libra_pkg;

  localparam int unsigned WORD_W = 40;
  localparam int unsigned VAL_W  = 35;
  localparam int unsigned TAG_W  = 3;
  localparam int unsigned PC_W   = 29;   // Absolute29 branch operand
  localparam int unsigned PS_W   = 24;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [VAL_W-1:0]  val_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Data types, in the row order of the partial unification table.
  typedef enum logic [2:0] {
    T_BOUND  = 3'd0,  // bound reference: value is the address of the next word
    T_UNB    = 3'd1,  // unbound variable: value is its own address
    T_INT    = 3'd2,
    T_SYM    = 3'd3,
    T_LIST1  = 3'd4,
    T_LIST2  = 3'd5,
    T_STRUC1 = 3'd6,
    T_STRUC2 = 3'd7
  } tag_e;

  function automatic logic [2:0] w_tag(word_t w);  return w[39:37]; endfunction
  function automatic logic [1:0] w_gc (word_t w);  return w[36:35]; endfunction
  function automatic val_t       w_val(word_t w);  return w[34:0];  endfunction
  function automatic word_t mkword(logic [2:0] t, logic [1:0] gc, val_t v);
    return {t, gc, v};
  endfunction

  // Register numbering (the register roles follow the architecture; the numbers do not).
  localparam logic [4:0] R_ZERO = 5'd0;
  localparam logic [4:0] R_H    = 5'd20;  // heap pointer
  localparam logic [4:0] R_E    = 5'd21;  // environment pointer
  localparam logic [4:0] R_B    = 5'd22;  // choice point pointer
  localparam logic [4:0] R_TR   = 5'd23;  // trail pointer
  localparam logic [4:0] R_HB   = 5'd24;  // heap backtrack bound
  localparam logic [4:0] R_EB   = 5'd25;  // environment (stack) backtrack bound
  localparam logic [4:0] R_SLIM = 5'd26;  // heap/stack collision limit, start of stack region
  localparam logic [4:0] R_TLIM = 5'd27;  // trail limit
  localparam logic [4:0] R_CP0  = 5'd28;  // return address registers CP0..CP3 = r28..r31

  // Instruction classes (Figure "LIBRA instruction set").
  typedef enum logic [2:0] {
    C_LIMM  = 3'd0,  // ALU with long immediate {HI19, LoImm16}
    C_SIMM  = 3'd1,  // ALU with short (sign extended) immediate
    C_REG   = 3'd2,  // ALU register-register
    C_SHIFT = 3'd3,  // shifts and processor control
    C_LDST  = 3'd4,  // load and store
    C_PRED  = 3'd5,  // pre-decrement stack operations
    C_POST  = 3'd6,  // post-increment stack operations
    C_CTRL  = 3'd7   // partial unification and execution control
  } class_e;

  // Instruction fields. op3 = {type[3], type[1:0]}; type[2] is the se bit.
  function automatic logic [3:0] f_cond (word_t i); return i[39:36]; endfunction
  function automatic logic [2:0] f_class(word_t i); return i[35:33]; endfunction
  function automatic logic [2:0] f_op3  (word_t i); return {i[32], i[30:29]}; endfunction
  function automatic logic       f_se   (word_t i); return i[31]; endfunction
  function automatic logic [4:0] f_r1   (word_t i); return i[28:24]; endfunction
  function automatic logic [4:0] f_r2   (word_t i); return i[23:19]; endfunction
  function automatic logic [4:0] f_r3reg(word_t i); return i[18:14]; endfunction
  function automatic logic [2:0] f_t3reg(word_t i); return i[13:11]; endfunction
  function automatic logic [2:0] f_t2reg(word_t i); return i[10:8];  endfunction
  function automatic logic [2:0] f_t3imm(word_t i); return i[23:21]; endfunction
  function automatic logic [4:0] f_r3imm(word_t i); return i[20:16]; endfunction
  function automatic logic [15:0] f_imm16(word_t i); return i[15:0]; endfunction

  // ALU operations of the value ALU.
  typedef enum logic [3:0] {
    A_ADD = 4'd0, A_ADDC = 4'd1, A_SUB = 4'd2, A_SUBC = 4'd3,
    A_AND = 4'd4, A_OR   = 4'd5, A_XOR = 4'd6,
    A_SRA = 4'd7, A_SLA  = 4'd8, A_SLL = 4'd9, A_PASSB = 4'd10
  } aluop_e;

  // Partial unify actions (legend of the partial unification table).
  typedef enum logic [2:0] {
    U_DEREF   = 3'd0,  // branch backward to dereference
    U_BIND_JS = 3'd1,  // bind junior to senior
    U_BIND_AB = 3'd2,  // bind A to B
    U_BIND_BA = 3'd3,  // bind B to A
    U_FAIL_NE = 3'd4,  // fail if A != B
    U_FAIL    = 3'd5,  // fail always
    U_PRELOAD = 3'd6   // branch to pre-load address
  } uact_e;

  // Condition codes (4-bit field of every instruction; IF adds an invert bit).
  typedef enum logic [3:0] {
    CC_AL = 4'd0, CC_EQ = 4'd1, CC_NE = 4'd2, CC_CS = 4'd3, CC_CC = 4'd4,
    CC_MI = 4'd5, CC_PL = 4'd6, CC_VAR = 4'd7, CC_BOUND1 = 4'd8, CC_BOUND2 = 4'd9,
    CC_TRAIL1 = 4'd10, CC_TRAIL2 = 4'd11, CC_ENV1 = 4'd12, CC_ENV2 = 4'd13,
    CC_OVF = 4'd14, CC_TVNE = 4'd15
  } cond_e;

  // Processor status word bit positions.
  localparam int PS_Z = 0, PS_N = 1, PS_C = 2, PS_B1 = 3, PS_B2 = 4, PS_T1 = 5,
                 PS_T2 = 6, PS_E1 = 7, PS_E2 = 8, PS_OVF = 9, PS_TEQ = 10,
                 PS_TA = 11, PS_TB = 14, PS_VAR = 17;  // tags occupy 13:11 and 16:14

  // Control word fields.
  typedef enum logic [1:0] { B_REG, B_LIMM, B_SIMM, B_ZERO } bsel_e;
  typedef enum logic [3:0] {
    RS_ALU, RS_MEM, RS_DEREF, RS_REF, RS_R1WORD, RS_PC1, RS_PS, RS_NONE
  } ressel_e;
  typedef enum logic [1:0] { WA_R3REG, WA_R3IMM, WA_CP0, WA_R1 } wasel_e;
  typedef enum logic [1:0] { P_NONE, P_PREDEC, P_POSTINC } ptrop_e;
  typedef enum logic [1:0] { M_NONE, M_LOAD, M_STORE } memop_e;
  typedef enum logic [2:0] { AD_R1IMM, AD_R1, AD_R1M1, AD_AVAL, AD_BVAL, AD_JUNIOR } addr_e;
  typedef enum logic [3:0] {
    WD_R3, WD_R3_T3, WD_T3_IMM16, WD_R2, WD_R2_T3, WD_T2_R2, WD_T2_IMM13, WD_T3_IMM16P,
    WD_BWORD, WD_AWORD, WD_REF_SENIOR
  } wdsel_e;
  typedef enum logic [1:0] { D_NONE, D_REG, D_MEM } deref_e;
  typedef enum logic [3:0] {
    BR_NONE, BR_ABS, BR_CALL, BR_RET, BR_SWITCH, BR_IF, BR_IFBIT, BR_TRAP, BR_TRAPCALL,
    BR_INDEX1, BR_INDEX2, BR_INDEXB, BR_PAGE16, BR_DEREF, BR_FAIL, BR_FAIL_NE
  } br_e;
  typedef enum logic [2:0] {
    SP_NONE, SP_LDHI, SP_LDGC, SP_LDGCHI, SP_SET, SP_CLEAR, SP_RESTPS, SP_SAVPS
  } spec_e;

  // Template and difference program counter operations.
  typedef enum logic [1:0] { TP_NONE, TP_LDDPC, TP_HOLE } tpl_e;

  typedef struct packed {
    logic    valid_op;   // opcode is defined
    aluop_e  alu;
    bsel_e   bsel;
    logic    reg_fmt;    // register format (r3 and t3 at their register-format positions)
    logic    tag_imm;    // result tag comes from t3
    logic    gc_latch;   // result GC bits come from the GC latch (long immediate)
    logic    we_a;
    ressel_e res;
    wasel_e  wa;
    ptrop_e  ptr;
    memop_e  mem;
    addr_e   addr;
    wdsel_e  wd;
    deref_e  deref;
    br_e     br;
    spec_e   spec;
    logic    is_unify;
    logic    sc;         // sets condition codes and latches the tag pair
    tpl_e    tpl;        // load the difference PC, or fill a template hole
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    valid_op: 1'b0, alu: A_ADD, bsel: B_REG, reg_fmt: 1'b1, tag_imm: 1'b0, gc_latch: 1'b0,
    we_a: 1'b0, res: RS_NONE, wa: WA_R3REG, ptr: P_NONE, mem: M_NONE, addr: AD_R1IMM,
    wd: WD_R3, deref: D_NONE, br: BR_NONE, spec: SP_NONE, is_unify: 1'b0, sc: 1'b0, tpl: TP_NONE};

endpackage
