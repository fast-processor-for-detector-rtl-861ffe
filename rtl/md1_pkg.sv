// md1_pkg: number format, control-word layout and arithmetic shared by the
// MD-1 event processor.
//
// Numbers are 24-bit floating point: a 16-bit mantissa, a 6-bit exponent
// magnitude and two sign bits (mantissa sign, exponent sign), as in the
// original design. The bit order, the meaning of the mantissa
// (a fraction 0.1xxx... with its leading one stored) and the all-zero code for
// the number zero are this design's choices:
//
//   [23]    mantissa sign (1 = negative); this is the unibus "sign line"
//   [22]    exponent sign (1 = negative)
//   [21:16] exponent magnitude, 0..63
//   [15:0]  mantissa M, value = (-1)^s * (M / 2^16) * 2^E, M[15] = 1 unless zero
//
// Results are truncated (no rounding), overflow saturates to the largest
// magnitude, underflow flushes to zero.
//
// The 40-bit control word (one per 30 ns step) is laid out as md1_cw_t below.
// The original design gives 40 drive lines, position coding of operations and
// memory addresses taken from the drive lines; the bit allocation is this
// design's own.
package md1_pkg;

  localparam int WORD_W = 24;
  localparam int MANT_W = 16;
  localparam int EXP_W  = 6;
  localparam int CW_W   = 40;
  localparam int SIGN_BIT = 23;

  typedef logic [WORD_W-1:0] md1_word_t;

  // Unibus source codes (output drive lines, one source per step).
  typedef enum logic [3:0] {
    SRC_NONE   = 4'd0,
    SRC_SUM1   = 4'd1,
    SRC_SUM2   = 4'd2,
    SRC_MUL    = 4'd3,
    SRC_DIV    = 4'd4,
    SRC_FUNC   = 4'd5,
    SRC_INTV   = 4'd6,
    SRC_CMP    = 4'd7,
    SRC_PS     = 4'd8,
    SRC_WS     = 4'd9,
    SRC_SF     = 4'd10,
    SRC_STACK  = 4'd11,
    SRC_ABSENT = 4'd12
  } md1_src_e;

  localparam int N_SRC = 13;

  // Function-table selector.
  typedef enum logic [1:0] {
    FN_SQRT   = 2'd0,
    FN_SIN    = 2'd1,
    FN_COS    = 2'd2,
    FN_ARCSIN = 2'd3
  } md1_fn_e;

  // Comparator operation type.
  typedef enum logic [1:0] {
    CMP_LT     = 2'd0,  // sign line = (first < second)
    CMP_ABS_LT = 2'd1,  // sign line = (|first| < |second|)
    CMP_MIN    = 2'd2,  // keep the smaller number
    CMP_MAX    = 2'd3   // keep the greater number
  } md1_cmp_e;

  // Data (AU) control word, bit 39 = 0.
  typedef struct packed {
    logic       ctrl;      // [39]    0: AU instruction
    logic       spare;     // [38]
    logic       s1_in1;    // [37] summer 1: 1st number input
    logic       s1_in2;    // [36] summer 1: 2nd number input (starts)
    logic       s1_sub;    // [35] summer 1: "+ or -" line (1 = subtract)
    logic       s2_in1;    // [34] summer 2
    logic       s2_in2;    // [33]
    logic       s2_sub;    // [32]
    logic       mul_in1;   // [31] multiplier: 1st number input
    logic       mul_in2;   // [30] multiplier: 2nd number input (starts)
    logic       div_in1;   // [29] divider: dividend input
    logic       div_in2;   // [28] divider: divisor input (starts)
    logic       fn_ld;     // [27] function table: argument input
    logic       iv_in;     // [26] interval unit: next number input
    logic       cmp_in1;   // [25] comparator: 1st number input
    logic       cmp_in2;   // [24] comparator: 2nd number input
    logic       ps_addr;   // [23] PS: cell address (starts read)
    logic       ws_addr;   // [22] WS: cell address (starts read)
    logic       ws_in;     // [21] WS: number input (write at ADDR)
    logic       sf_in;     // [20] superfast: number input (register ADDR[2:0])
    logic       stk_in;    // [19] stack: number input (push)
    logic       stk_reset; // [18] stack: reset
    md1_fn_e    fn_type;   // [17:16] function type
    md1_cmp_e   cmp_op;    // [15:14] comparison type
    md1_src_e   src;       // [13:10] unit driving the unibus
    logic [9:0] addr;      // [9:0]   cell / register address
  } md1_cw_t;

  // Control-unit instruction, bit 39 = 1.
  typedef enum logic [3:0] {
    CU_NOP   = 4'd0,
    CU_JMP   = 4'd1,  // unconditional jump
    CU_JS    = 4'd2,  // jump if sign line was 1
    CU_JNS   = 4'd3,  // jump if sign line was 0
    CU_CALL  = 4'd4,  // call subroutine
    CU_RET   = 4'd5,  // return from subroutine
    CU_WAIT  = 4'd6,  // stop issuing for N steps
    CU_SETC  = 4'd7,  // load the step counter with N
    CU_LOOP  = 4'd8,  // decrement step counter, jump if not zero
    CU_HALT  = 4'd9   // end of program
  } md1_cuop_e;

  typedef struct packed {
    logic        ctrl;    // [39]    1: control instruction
    md1_cuop_e   op;      // [38:35]
    logic [4:0]  spare;   // [34:30]
    logic [15:0] n;       // [29:14] count
    logic [13:0] target;  // [13:0]  jump address
  } md1_ci_t;

  // ---------------------------------------------------------------------
  // Arithmetic on the 24-bit format.
  // ---------------------------------------------------------------------
  localparam md1_word_t FP_ZERO = '0;
  localparam md1_word_t FP_MAX  = {1'b0, 1'b0, 6'd63, 16'hFFFF};

  function automatic int fp_exp(md1_word_t a);
    return a[22] ? -int'(a[21:16]) : int'(a[21:16]);
  endfunction

  function automatic logic fp_is_zero(md1_word_t a);
    return a[15:0] == '0;
  endfunction

  // Pack sign s and the magnitude m * 2^(e-32) into a normalized number.
  function automatic md1_word_t fp_pack(logic s, int e, logic [47:0] m);
    int p;
    int ex;
    logic [47:0] sh;
    md1_word_t r;
    p = -1;
    for (int i = 0; i < 48; i++) if (m[i]) p = i;
    if (p < 0) return FP_ZERO;
    ex = p - 31 + e;
    if (p >= 15) sh = m >> (p - 15);
    else         sh = m << (15 - p);
    if (ex > 63) begin
      r = FP_MAX;
      r[23] = s;
      return r;
    end
    if (ex < -63) return FP_ZERO;
    r[23]    = s;
    r[22]    = ex < 0;
    r[21:16] = 6'(ex < 0 ? -ex : ex);
    r[15:0]  = sh[15:0];
    return r;
  endfunction

  // a + b, or a - b when sub is set.
  function automatic md1_word_t fp_add(md1_word_t a, md1_word_t b, logic sub);
    logic sa, sb;
    int ea, eb, d;
    logic [47:0] ma, mb;
    sa = a[23];
    sb = b[23] ^ sub;
    if (fp_is_zero(b)) return a;
    if (fp_is_zero(a)) begin
      md1_word_t r;
      r = b;
      r[23] = sb;
      return r;
    end
    ea = fp_exp(a);
    eb = fp_exp(b);
    ma = {16'd0, a[15:0], 16'd0};
    mb = {16'd0, b[15:0], 16'd0};
    if (eb > ea) begin
      // swap so that a has the larger exponent
      logic t; int te; logic [47:0] tm;
      t = sa; sa = sb; sb = t;
      te = ea; ea = eb; eb = te;
      tm = ma; ma = mb; mb = tm;
    end
    d = ea - eb;
    mb = (d > 47) ? 48'd0 : (mb >> d);
    if (sa == sb) return fp_pack(sa, ea, ma + mb);
    if (ma >= mb) return fp_pack(sa, ea, ma - mb);
    return fp_pack(sb, ea, mb - ma);
  endfunction

  function automatic md1_word_t fp_mul(md1_word_t a, md1_word_t b);
    logic [47:0] m;
    m = {16'd0, 32'(a[15:0]) * 32'(b[15:0])};
    return fp_pack(a[23] ^ b[23], fp_exp(a) + fp_exp(b), m);
  endfunction

  function automatic md1_word_t fp_div(md1_word_t a, md1_word_t b);
    logic [47:0] q;
    md1_word_t r;
    if (fp_is_zero(b)) begin
      r = FP_MAX;
      r[23] = a[23] ^ b[23];
      return r;
    end
    q = {a[15:0], 32'd0} / {32'd0, b[15:0]};
    return fp_pack(a[23] ^ b[23], fp_exp(a) - fp_exp(b), q);
  endfunction

  // Magnitude key: ordering of keys is ordering of |value|.
  function automatic logic [23:0] fp_mag_key(md1_word_t a);
    logic [6:0] eb;
    if (fp_is_zero(a)) return '0;
    eb = 7'(fp_exp(a) + 64);
    return {1'b1, eb, a[15:0]};
  endfunction

  function automatic logic fp_abs_lt(md1_word_t a, md1_word_t b);
    return fp_mag_key(a) < fp_mag_key(b);
  endfunction

  function automatic logic fp_lt(md1_word_t a, md1_word_t b);
    logic na, nb;
    na = a[23] && !fp_is_zero(a);
    nb = b[23] && !fp_is_zero(b);
    if (na && !nb) return 1'b1;
    if (!na && nb) return 1'b0;
    if (!na) return fp_mag_key(a) < fp_mag_key(b);
    return fp_mag_key(b) < fp_mag_key(a);
  endfunction

endpackage
