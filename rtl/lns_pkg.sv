// lns_pkg: shared types, constants and LNS helper functions of the VLIW LNS
// processor.
//
// Number format (32 bits): bit 31 is the sign of the value, bits 30:0 are the
// base-2 logarithm of its magnitude as a two's-complement fixed-point number
// with 8 integer and 23 fraction bits, giving a dynamic range of about
// 2^-128 .. 2^+128.  The most negative logarithm (bits 30:0 = 0x4000_0000)
// encodes the value zero.  Results that overflow saturate to the largest
// logarithm; results that underflow flush to zero.  The sign/logarithm split
// and the ~2^+-128 range follow the description of the machine; the exact
// field widths and the zero code are this design's choice.
//
// Instruction fields (decompressed form): chunk3 (ALU, always present),
// chunk2 (LNS unit), chunk1 (memory unit) and a 32-bit immediate or absolute
// branch address.  Bit positions follow the published chunk layouts.
package lns_pkg;

  localparam int unsigned WORD    = 32;       // data word
  localparam int unsigned LOGW    = 31;       // logarithm field
  localparam int unsigned FRAC    = 23;       // fraction bits of the logarithm
  localparam int unsigned NREG    = 16;       // register numbers (R0 is special)

  typedef logic [WORD-1:0] word_t;
  typedef logic [3:0]      reg_t;

  localparam logic [LOGW-1:0] LOG_ZERO = {1'b1, {(LOGW-1){1'b0}}};  // zero code
  localparam logic [LOGW-1:0] LOG_MAX  = {1'b0, {(LOGW-1){1'b1}}};  // largest
  localparam logic [LOGW-1:0] LOG_MIN  = {1'b1, {(LOGW-2){1'b0}}, 1'b1}; // smallest nonzero
  localparam word_t LNS_ZERO = {1'b0, LOG_ZERO};
  localparam word_t LNS_ONE  = '0;                                   // log2(1) = 0

  // ---------------------------------------------------------------- ALU ops
  // chunk3 = ir[63:48] = {lns, mem, bimm[1:0], op[3:0], rd[3:0], rs[3:0]}
  typedef enum logic [3:0] {
    ALU_LMUL   = 4'd0,
    ALU_ADD    = 4'd1,
    ALU_LDIV   = 4'd2,
    ALU_SUB    = 4'd3,
    ALU_AND    = 4'd4,
    ALU_OR     = 4'd5,
    ALU_XOR    = 4'd6,
    ALU_SBB    = 4'd7,
    ALU_ADC    = 4'd8,
    ALU_ROR    = 4'd9,
    ALU_MOVPC  = 4'd10,
    ALU_MOV    = 4'd11,
    ALU_LSQRT  = 4'd12,
    ALU_LRECIP = 4'd13,
    ALU_LABS   = 4'd14,
    ALU_LSQR   = 4'd15
  } alu_op_e;

  // Branch / immediate field ir[61:60]
  typedef enum logic [1:0] {
    BI_NONE = 2'b00,   // no 32-bit field
    BI_IMM  = 2'b01,   // 32-bit immediate for register-0 operands
    BI_BT   = 2'b10,   // branch to ir[31:0] if flag is 1
    BI_BNF  = 2'b11    // branch to ir[31:0] if flag is 0
  } bimm_e;

  // ---------------------------------------------------------------- LNS ops
  // chunk2 = ir[47:32] = {op[2:0], w, ra[3:0], rb[3:0], rc[3:0]}
  typedef enum logic [2:0] {
    LNS_LADD   = 3'd0,
    LNS_LSUB   = 3'd1,
    LNS_LADDQ  = 3'd2,
    LNS_LSUBQ  = 3'd3,
    LNS_LIM    = 3'd4,
    LNS_LIMQ   = 3'd5,
    LNS_ROMLOG = 3'd6,
    LNS_RSVD   = 3'd7
  } lns_op_e;

  typedef struct packed {
    logic    lns;     // ir[63]  chunk2 present
    logic    mem;     // ir[62]  chunk1 present
    bimm_e   bimm;    // ir[61:60]
    alu_op_e op;      // ir[59:56]
    reg_t    rd;      // ir[55:52]
    reg_t    rs;      // ir[51:48]
  } chunk3_t;

  typedef struct packed {
    lns_op_e op;      // ir[47:45]
    logic    w;       // ir[44]  wait bit
    reg_t    ra;      // ir[43:40] destination
    reg_t    rb;      // ir[39:36]
    reg_t    rc;      // ir[35:32]
  } chunk2_t;

  typedef struct packed {
    logic [1:0] unused; // ir[31:30]
    logic    d;       // ir[29] double (64-bit) transfer
    logic    l;       // ir[28] load
    reg_t    rt;      // ir[27:24] data register
    reg_t    ri;      // ir[23:20] address register (post-incremented)
    reg_t    ro;      // ir[19:16] increment register
  } chunk1_t;

  typedef struct packed {
    chunk3_t c3;
    chunk2_t c2;      // all zero when ir[63] = 0
    chunk1_t c1;      // all zero when ir[62] = 0
    word_t   imm;     // immediate / branch target, zero when absent
    logic [2:0] len;  // compressed length in 16-bit chunks (1..4)
    logic    illegal; // prohibited header combination
  } dec_instr_t;

  // ------------------------------------------------------- LNS helpers
  function automatic logic lns_is_zero(word_t x);
    return x[LOGW-1:0] == LOG_ZERO;
  endfunction

  // Saturate a wide signed logarithm into the 31-bit field; underflow -> zero.
  function automatic logic [LOGW-1:0] lns_sat(logic signed [35:0] v);
    if (v > 36'sd1073741823)       return LOG_MAX;
    else if (v < -36'sd1073741823) return LOG_ZERO;
    else                           return v[LOGW-1:0];
  endfunction

  // LNS multiply / divide: add / subtract logarithms, xor signs.
  function automatic word_t lns_mul(word_t a, word_t b, logic div);
    logic signed [35:0] s;
    if (lns_is_zero(a)) return LNS_ZERO;
    if (lns_is_zero(b)) return div ? {a[31] ^ b[31], LOG_MAX} : LNS_ZERO;
    s = div ? 36'(signed'(a[LOGW-1:0])) - 36'(signed'(b[LOGW-1:0]))
            : 36'(signed'(a[LOGW-1:0])) + 36'(signed'(b[LOGW-1:0]));
    if (lns_sat(s) == LOG_ZERO) return LNS_ZERO;
    return {a[31] ^ b[31], lns_sat(s)};
  endfunction

  // Real-valued less-than of two LNS words.
  function automatic logic lns_lt(word_t a, word_t b);
    logic za, zb;
    logic signed [LOGW-1:0] la, lb;
    za = lns_is_zero(a);
    zb = lns_is_zero(b);
    la = signed'(a[LOGW-1:0]);
    lb = signed'(b[LOGW-1:0]);
    if (za && zb) return 1'b0;
    if (za)       return !b[31];               // 0 < b  iff b positive
    if (zb)       return a[31];                // a < 0  iff a negative
    if (a[31] != b[31]) return a[31];          // negative < positive
    if (!a[31])   return la < lb;              // both positive
    return la > lb;                            // both negative
  endfunction

endpackage
