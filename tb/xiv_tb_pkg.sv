// xiv_tb_pkg: reference arithmetic for the xinterval testbenches.
//
// Bound values are converted to `real` (IEEE double). Every sum of two
// bounds whose exponents differ by at most 28, and every product of two
// bounds, is exact in a double, so a directed-rounding result r of the exact
// value x can be judged without a rounding model of its own:
//   round down:  r <= x  and  next_up(r)   > x
//   round up:    r >= x  and  next_down(r) < x
// Infinities are stood in for by +-1e300, far above the largest finite
// bound (about 1.8e19).
package xiv_tb_pkg;
  import xiv_pkg::*;

  localparam real BIG = 1.0e300;

  function automatic real fp2r(fp31_t a);
    int unsigned e, f;
    real v;
    e = 32'(a[29:23]);
    f = 32'(a[22:0]);
    if (e == 127) v = BIG;
    else if (e == 0) v = real'(f) * (2.0 ** (1.0 - 63.0 - 23.0));
    else v = real'(f + 32'h0080_0000) * (2.0 ** (real'(e) - 63.0 - 23.0));
    return a[30] ? -v : v;
  endfunction

  function automatic fp31_t next_up(fp31_t a);
    if (a[29:0] == '0) return 31'h1;
    if (!a[30]) return (a == 31'h3F80_0000) ? a : a + 31'd1;  // +inf stays
    return a - 31'd1;
  endfunction

  function automatic fp31_t next_down(fp31_t a);
    return fp_neg(next_up(fp_neg(a)));
  endfunction

  function automatic logic check_dir(fp31_t r, real x, logic up);
    if (up) return (fp2r(r) >= x) && (fp2r(next_down(r)) < x);
    return (fp2r(r) <= x) && (fp2r(next_up(r)) > x);
  endfunction

  // random bound with exponent in [elo, ehi]
  function automatic fp31_t rand_fp(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 7'(e), 23'($urandom)};
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic fp31_t r2fp_exact(real x);
    // for test vectors only: exact conversion of small integers and halves
    fp31_t r;
    real m;
    int e;
    if (x == 0.0) return '0;
    m = x < 0 ? -x : x;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0) begin m = m * 2.0; e--; end
    r = {x < 0, 7'(e + 63), 23'(longint'((m - 1.0) * 8388608.0))};
    return r;
  endfunction

  function automatic real rmin(real a, real b); return a < b ? a : b; endfunction
  function automatic real rmax(real a, real b); return a > b ? a : b; endfunction

  // Independent reference for one interval operation: the exact result
  // bounds are computed in double precision, and the hardware result must be
  // their outward rounding (check_dir). Returns 1 when `r` is right.
  function automatic logic check_interval(xiv_op_e op, interval_t a, interval_t b,
                                          logic [63:0] data, interval_t r);
    real al, ah, bl, bh, lo, hi;
    logic exp_empty, exp_iota, special;
    al = fp2r(a.lo); ah = fp2r(a.hi); bl = fp2r(b.lo); bh = fp2r(b.hi);
    // a NaN bound sets iota; with an infinite or NaN operand bound only the
    // flags are compared here (the testbenches check such cases directly)
    exp_iota  = a.iota | b.iota | fp_is_nan(a.lo) | fp_is_nan(a.hi) |
                fp_is_nan(b.lo) | fp_is_nan(b.hi);
    special   = fp_is_nan(a.lo) | fp_is_nan(a.hi) | fp_is_nan(b.lo) | fp_is_nan(b.hi) |
                fp_is_inf(a.lo) | fp_is_inf(a.hi) | fp_is_inf(b.lo) | fp_is_inf(b.hi);
    exp_empty = a.empty | b.empty;
    lo = 0.0; hi = 0.0;
    case (op)
      OP_LOAD: return r == interval_t'(data);
      OP_READ: return r == a;
      OP_ADD: begin lo = al + bl; hi = ah + bh; end
      OP_SUB: begin lo = al - bh; hi = ah - bl; end
      OP_MUL: begin
        lo = rmin(rmin(al * bl, al * bh), rmin(ah * bl, ah * bh));
        hi = rmax(rmax(al * bl, al * bh), rmax(ah * bl, ah * bh));
      end
      OP_NEG: begin
        lo = -ah; hi = -al; exp_empty = a.empty;
        exp_iota = a.iota | fp_is_nan(a.lo) | fp_is_nan(a.hi);
      end
      OP_SQR: begin
        exp_iota = a.iota | fp_is_nan(a.lo) | fp_is_nan(a.hi); exp_empty = a.empty;
        if (al >= 0.0)      begin lo = al * al; hi = ah * ah; end
        else if (ah <= 0.0) begin lo = ah * ah; hi = al * al; end
        else                begin lo = 0.0; hi = rmax(al * al, ah * ah); end
      end
      OP_INTER: begin
        lo = rmax(al, bl); hi = rmin(ah, bh);
        if (lo > hi) exp_empty = 1'b1;
      end
      OP_HULL: begin
        if (a.empty && b.empty) exp_empty = 1'b1;
        else if (a.empty) begin exp_empty = 1'b0; lo = bl; hi = bh; end
        else if (b.empty) begin exp_empty = 1'b0; lo = al; hi = ah; end
        else begin exp_empty = 1'b0; lo = rmin(al, bl); hi = rmax(ah, bh); end
      end
      default: return 1'b0;
    endcase
    if (r.iota != exp_iota || r.empty != exp_empty) return 1'b0;
    if (exp_empty || special) return 1'b1;
    return check_dir(r.lo, lo, 1'b0) && check_dir(r.hi, hi, 1'b1);
  endfunction

  // random finite interval; exponents in [elo, ehi]; `pct_empty` percent empty
  function automatic interval_t rand_iv(int elo, int ehi, int pct_empty);
    interval_t v;
    fp31_t x, y;
    x = rand_fp(elo, ehi);
    y = rand_fp(elo, ehi);
    if ($urandom_range(9) == 0) x = {x[30], 30'd0};   // a zero bound now and then
    v.empty = ($urandom_range(99) < pct_empty);
    v.iota  = 1'b0;
    v.lo    = fp_lt(y, x) ? y : x;
    v.hi    = fp_lt(y, x) ? x : y;
    return v;
  endfunction

  // R-type custom-0 instruction word
  function automatic logic [31:0] mk_instr(xiv_op_e op, int rd, int rs1, int rs2);
    return {7'(op), 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OPC_CUSTOM0};
  endfunction
endpackage
