// xiv_fp31_mul: multiplier for the 31-bit interval bound format (sign 1,
// exponent 7, fraction 23, bias 63) with directed rounding.
//
// One significand product is rounded both ways: `y_dn` toward -inf (for
// lower bounds) and `y_up` toward +inf (for upper bounds). The 24x24-bit
// significand product is normalised with a leading-zero count
// (so subnormal operands are handled), shifted right into the subnormal range
// when the exponent underflows, and rounded with the inexact bit. The bound
// format is the published one; the datapath is this design's own choice.
//
// Interface: purely combinational, y_dn and y_up are a * b rounded down/up.
// Specials: NaN in gives a quiet NaN; inf * finite non-zero gives inf.
// inf * 0 gives a signed zero, not NaN: in interval arithmetic an infinite
// bound stands for an unbounded end, and the product of a zero bound with it
// contributes 0 to the hull of the endpoint products.
module xiv_fp31_mul
  import xiv_pkg::*;
(
  input  fp31_t a,
  input  fp31_t b,
  output fp31_t y_dn,
  output fp31_t y_up
);

  localparam int unsigned PW = 2 * (FRAC_W + 1);  // 48-bit product

  logic               s;
  logic [EXP_W-1:0]   ea, eb;
  logic [FRAC_W:0]    ma, mb;
  logic [PW-1:0]      p, pn;
  logic [2*PW-1:0]    psh;
  logic               sticky;
  logic signed [11:0] exp_n;
  int unsigned        lz;
  int unsigned        rs;

  always_comb begin
    s  = a[FP_W-1] ^ b[FP_W-1];
    ea = (a[FP_W-2 -: EXP_W] == '0) ? EXP_W'(1) : a[FP_W-2 -: EXP_W];
    eb = (b[FP_W-2 -: EXP_W] == '0) ? EXP_W'(1) : b[FP_W-2 -: EXP_W];
    ma = {a[FP_W-2 -: EXP_W] != '0, a[FRAC_W-1:0]};
    mb = {b[FP_W-2 -: EXP_W] != '0, b[FRAC_W-1:0]};
    p  = PW'(ma) * PW'(mb);

    lz = 0;
    for (int i = PW - 1; i >= 0; i--) begin
      if (p[i]) break;
      lz++;
    end
    pn     = p << lz;
    exp_n  = 12'(ea) + 12'(eb) - 12'sd62 - 12'(lz);
    sticky = 1'b0;
    psh    = '0;
    y_dn   = '0;
    y_up   = '0;
    rs     = 0;
    if (exp_n < 12'sd1) begin
      // underflow: denormalise with sticky
      rs     = (32'(12'sd1 - exp_n) > PW + 1) ? PW + 1 : 32'(12'sd1 - exp_n);
      psh    = {pn, {PW{1'b0}}} >> rs;
      pn     = psh[2*PW-1:PW];
      sticky = |psh[PW-1:0];
      exp_n  = 12'sd1;
    end

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      y_dn = FP_QNAN;
      y_up = FP_QNAN;
    end else if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) begin
      y_dn = {s, {(FP_W-1){1'b0}}};
      y_up = y_dn;
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      y_dn = {s, EXP_MAX, {FRAC_W{1'b0}}};
      y_up = y_dn;
    end else if (fp_is_zero(a) || fp_is_zero(b)) begin
      y_dn = {s, {(FP_W-1){1'b0}}};
      y_up = y_dn;
    end else begin
      y_dn = fp_round_pack(s, exp_n, pn[PW-1 -: FRAC_W+1], (|pn[PW-FRAC_W-2:0]) | sticky, 1'b0);
      y_up = fp_round_pack(s, exp_n, pn[PW-1 -: FRAC_W+1], (|pn[PW-FRAC_W-2:0]) | sticky, 1'b1);
    end
  end

endmodule
