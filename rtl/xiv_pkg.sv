// xiv_pkg: types, encodings and helper functions shared by the xinterval
// coprocessor.
//
// An interval lives in one 64-bit RISC-V floating-point register, packed as
//   bit 63      empty flag   (the interval is the empty set)
//   bits 62:32  lower bound  (31-bit float: sign 1, exponent 7, fraction 23)
//   bit 31      iota flag
//   bits 30:0   upper bound  (31-bit float, same layout)
// This layout follows the published format. The 31-bit bound is handled
// like an IEEE-754 binary format: exponent bias 63, exponent 0 for zero and
// subnormals, exponent 127 for infinities (fraction 0) and NaN.
// The meaning of the iota flag is not published; here it marks an invalid
// interval (not-an-interval): it is set when an operand bound is NaN and
// propagates through every operation.
//
// Instructions use the RISC-V R-type layout on the custom-0 major opcode;
// funct7 selects the operation. This encoding is this design's own choice.
package xiv_pkg;

  localparam int unsigned XLEN   = 64;
  localparam int unsigned NREGS  = 32;
  localparam int unsigned EXP_W  = 7;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned FP_W   = 1 + EXP_W + FRAC_W;  // 31
  localparam int unsigned BIAS   = 63;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

  typedef logic [FP_W-1:0] fp31_t;

  typedef struct packed {
    logic  empty;
    fp31_t lo;
    logic  iota;
    fp31_t hi;
  } interval_t;

  // funct7 values of the supported operations
  typedef enum logic [6:0] {
    OP_LOAD  = 7'd0,  // rd <- data          (replicate an ISA-simulator register)
    OP_READ  = 7'd1,  // result <- rs1        (read back a register)
    OP_ADD   = 7'd2,  // rd <- rs1 + rs2
    OP_SUB   = 7'd3,  // rd <- rs1 - rs2
    OP_MUL   = 7'd4,  // rd <- rs1 * rs2
    OP_NEG   = 7'd5,  // rd <- -rs1
    OP_SQR   = 7'd6,  // rd <- rs1^2
    OP_INTER = 7'd7,  // rd <- rs1 intersect rs2
    OP_HULL  = 7'd8   // rd <- interval hull of rs1 and rs2
  } xiv_op_e;

  // What the host hands the core on `enable`: the 32-bit instruction word and
  // a 64-bit data word that only OP_LOAD uses.
  typedef struct packed {
    logic [XLEN-1:0] data;
    logic [31:0]     word;
  } xiv_instr_t;

  typedef struct packed {
    logic        legal;
    xiv_op_e     op;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        wr_en;     // the operation writes rd
    logic [XLEN-1:0] data;
  } xiv_dec_t;

  // ---- 31-bit float helpers ----------------------------------------------

  function automatic logic fp_is_nan(fp31_t a);
    return (a[FP_W-2 -: EXP_W] == EXP_MAX) && (a[FRAC_W-1:0] != '0);
  endfunction

  function automatic logic fp_is_inf(fp31_t a);
    return (a[FP_W-2 -: EXP_W] == EXP_MAX) && (a[FRAC_W-1:0] == '0);
  endfunction

  function automatic logic fp_is_zero(fp31_t a);
    return a[FP_W-2:0] == '0;
  endfunction

  // a < b for two non-NaN values; -0 and +0 compare equal
  function automatic logic fp_lt(fp31_t a, fp31_t b);
    logic sa, sb;
    logic [FP_W-2:0] ma, mb;
    sa = a[FP_W-1];
    sb = b[FP_W-1];
    ma = a[FP_W-2:0];
    mb = b[FP_W-2:0];
    if (ma == '0 && mb == '0) return 1'b0;
    if (sa != sb) return sa;
    if (sa) return ma > mb;
    return ma < mb;
  endfunction

  function automatic fp31_t fp_min(fp31_t a, fp31_t b);
    return fp_lt(b, a) ? b : a;
  endfunction

  function automatic fp31_t fp_max(fp31_t a, fp31_t b);
    return fp_lt(a, b) ? b : a;
  endfunction

  function automatic fp31_t fp_neg(fp31_t a);
    return {~a[FP_W-1], a[FP_W-2:0]};
  endfunction

  localparam fp31_t FP_POS_ZERO = '0;
  localparam fp31_t FP_QNAN     = {1'b0, EXP_MAX, 1'b1, {(FRAC_W-1){1'b0}}};

  // Round and pack a finite magnitude.
  //   exp   : biased exponent of the 24-bit significand `mant` (mant[23] is the
  //           hidden bit; mant[23]==0 only for subnormals, with exp == 1)
  //   inexact : bits below mant were non-zero
  //   up    : 1 rounds toward +inf, 0 toward -inf
  function automatic fp31_t fp_round_pack(logic sign, logic signed [11:0] exp,
                                          logic [FRAC_W:0] mant, logic inexact,
                                          logic up);
    logic            incr;
    logic [FRAC_W+1:0] m;
    logic signed [11:0] e;
    incr = inexact && (up ? !sign : sign);
    m    = {1'b0, mant} + (FRAC_W+2)'(incr);
    e    = exp;
    if (m[FRAC_W+1]) begin
      m = m >> 1;
      e = e + 12'sd1;
    end
    if (e >= 12'sd127) begin
      // overflow: to infinity when rounding away from zero, else to the largest finite
      if (up ? !sign : sign) return {sign, EXP_MAX, {FRAC_W{1'b0}}};
      else                   return {sign, EXP_MAX - 7'd1, {FRAC_W{1'b1}}};
    end
    if (!m[FRAC_W]) return {sign, {EXP_W{1'b0}}, m[FRAC_W-1:0]};  // subnormal or zero
    return {sign, e[EXP_W-1:0], m[FRAC_W-1:0]};
  endfunction

endpackage
