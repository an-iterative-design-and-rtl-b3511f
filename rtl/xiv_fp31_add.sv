// xiv_fp31_add: adder for the 31-bit interval bound format (sign 1,
// exponent 7, fraction 23, bias 63) with directed rounding.
//
// Interval arithmetic needs outward rounding: a lower bound is rounded toward
// -inf and an upper bound toward +inf, so `up` selects the direction. The
// datapath is the usual one for IEEE-754 addition: order the operands by
// magnitude, align the smaller significand with a sticky bit, add or
// subtract, normalise (gradual underflow to subnormals is kept), then round
// in the chosen direction. The bound format is the published one; the
// adder's internal organisation, the subnormal support and the NaN encoding
// of the result are this design's own choices.
//
// Interface: purely combinational, y = a + b (b_neg=1 gives a - b).
// Specials: NaN in gives a quiet NaN; +inf + -inf gives a quiet NaN; an exact
// zero from cancellation is -0 when rounding down, +0 otherwise.
module xiv_fp31_add
  import xiv_pkg::*;
(
  input  fp31_t a,
  input  fp31_t b,
  input  logic  b_neg,
  input  logic  up,
  output fp31_t y
);

  localparam int unsigned XW = FRAC_W + 4;  // 24-bit significand + guard, round, sticky

  fp31_t              bb;
  logic               swap;
  fp31_t              big, sml;
  logic [EXP_W-1:0]   eb_big, eb_small;
  logic [FRAC_W:0]    m_big, m_small;
  logic [7:0]         d;
  logic [2*XW-1:0]    shifted;
  logic [XW-1:0]      x_big, x_small;
  logic               eff_sub;
  logic [XW:0]        sum;
  logic [XW-1:0]      norm;
  logic signed [11:0] exp_n;
  int unsigned        lz;
  int unsigned        sh;

  always_comb begin
    bb   = b_neg ? fp_neg(b) : b;
    swap = bb[FP_W-2:0] > a[FP_W-2:0];
    big   = swap ? bb : a;
    sml = swap ? a : bb;
    eb_big   = (big[FP_W-2 -: EXP_W] == '0) ? EXP_W'(1) : big[FP_W-2 -: EXP_W];
    eb_small = (sml[FP_W-2 -: EXP_W] == '0) ? EXP_W'(1) : sml[FP_W-2 -: EXP_W];
    m_big   = {big[FP_W-2 -: EXP_W] != '0, big[FRAC_W-1:0]};
    m_small = {sml[FP_W-2 -: EXP_W] != '0, sml[FRAC_W-1:0]};
    d = 8'(eb_big) - 8'(eb_small);
    if (d > 8'(XW)) d = 8'(XW);

    // align the smaller operand, folding the bits shifted out into a sticky bit
    shifted = {m_small, 3'b000, {XW{1'b0}}} >> d;
    x_small = shifted[2*XW-1:XW];
    x_small[0] = x_small[0] | (|shifted[XW-1:0]);
    x_big = {m_big, 3'b000};

    eff_sub = big[FP_W-1] ^ sml[FP_W-1];
    sum = eff_sub ? ({1'b0, x_big} - {1'b0, x_small}) : ({1'b0, x_big} + {1'b0, x_small});

    // normalise
    norm  = '0;
    exp_n = 12'(eb_big);
    lz    = 0;
    sh    = 0;
    y     = '0;
    if (sum[XW]) begin
      norm  = sum[XW:1];
      norm[0] = norm[0] | sum[0];
      exp_n = exp_n + 12'sd1;
    end else begin
      for (int i = XW - 1; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sh = (lz < 32'(eb_big) - 1) ? lz : 32'(eb_big) - 1;
      norm  = sum[XW-1:0] << sh;
      exp_n = exp_n - 12'(sh);
    end

    // result
    if (fp_is_nan(a) || fp_is_nan(bb)) begin
      y = FP_QNAN;
    end else if (fp_is_inf(a) && fp_is_inf(bb)) begin
      y = (a[FP_W-1] == bb[FP_W-1]) ? a : FP_QNAN;
    end else if (fp_is_inf(a)) begin
      y = a;
    end else if (fp_is_inf(bb)) begin
      y = bb;
    end else if (sum == '0) begin
      y = {eff_sub ? !up : big[FP_W-1], {(FP_W-1){1'b0}}};
    end else begin
      y = fp_round_pack(big[FP_W-1], exp_n, norm[XW-1:3], |norm[2:0], up);
    end
  end

endmodule
