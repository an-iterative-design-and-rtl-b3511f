// xiv_execute: execute stage of the xinterval core, the set of interval
// hardware operators.
//
// Operations (funct7, see xiv_pkg): load, read, add, sub, mul, neg, sqr,
// intersection and hull of intervals in the 64-bit format of xiv_pkg. Bounds
// are computed with outward rounding: every lower bound is rounded toward
// -inf and every upper bound toward +inf, so the result always encloses the
// exact set. Multiplication takes the min and max of the four endpoint
// products (four multipliers, each rounding its product both ways); squaring reuses them with
// both operands equal and picks the bound pair from the sign of the operand.
// An empty operand gives an empty result (hull: the other operand), encoded
// as empty flag 1 with bounds [+inf, -inf]; the iota flag is the OR of the
// operands' iota flags and of any NaN bound.
//
// Timing: `start` captures the operation and operands; `done` pulses with
// `result` LAT_* cycles later (1 by default, for the purely combinational
// operators of this model). The operator latencies stand for those of a
// deeper FPGA pipeline and can be raised per operator class.
// Which interval operations exist is this design's choice: the published
// design only says they are the interval counterparts of the usual
// floating-point operators and transcendental functions.
module xiv_execute
  import xiv_pkg::*;
#(
  parameter int unsigned LAT_ADD  = 1,  // add, sub
  parameter int unsigned LAT_MUL  = 1,  // mul, sqr
  parameter int unsigned LAT_MISC = 1   // load, read, neg, inter, hull
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  xiv_op_e   op_in,
  input  interval_t a_in,
  input  interval_t b_in,
  input  logic [XLEN-1:0] data_in,
  output logic      busy,
  output logic      done,
  output interval_t result
);

  xiv_op_e         op;
  interval_t       a, b;
  logic [XLEN-1:0] data;
  logic [7:0]      cnt;

  // ---- operand and latency registers ----
  function automatic logic [7:0] lat_of(xiv_op_e o);
    case (o)
      OP_ADD, OP_SUB: return 8'(LAT_ADD);
      OP_MUL, OP_SQR: return 8'(LAT_MUL);
      default:        return 8'(LAT_MISC);
    endcase
  endfunction

  // ---- datapath ----
  fp31_t add_lo, add_hi;
  fp31_t p_lo [4];
  fp31_t p_hi [4];
  interval_t mb;
  interval_t r;

  assign mb = (op == OP_SQR) ? a : b;

  // add: [a.lo + b.lo, a.hi + b.hi]; sub: [a.lo - b.hi, a.hi - b.lo]
  xiv_fp31_add u_add_lo (.a(a.lo), .b(op == OP_SUB ? b.hi : b.lo), .b_neg(op == OP_SUB),
                         .up(1'b0), .y(add_lo));
  xiv_fp31_add u_add_hi (.a(a.hi), .b(op == OP_SUB ? b.lo : b.hi), .b_neg(op == OP_SUB),
                         .up(1'b1), .y(add_hi));

  // endpoint products: 0 = lo*lo, 1 = lo*hi, 2 = hi*lo, 3 = hi*hi
  for (genvar k = 0; k < 4; k++) begin : g_prod
    fp31_t x, y;
    assign x = k[1] ? a.hi : a.lo;
    assign y = k[0] ? mb.hi : mb.lo;
    xiv_fp31_mul u_mul (.a(x), .b(y), .y_dn(p_lo[k]), .y_up(p_hi[k]));
  end

  localparam interval_t EMPTY = '{empty: 1'b1, lo: {1'b0, EXP_MAX, {FRAC_W{1'b0}}},
                                  iota: 1'b0, hi: {1'b1, EXP_MAX, {FRAC_W{1'b0}}}};

  logic un_empty, bin_empty, un_iota, bin_iota;

  always_comb begin
    un_iota   = a.iota || fp_is_nan(a.lo) || fp_is_nan(a.hi);
    bin_iota  = un_iota || b.iota || fp_is_nan(b.lo) || fp_is_nan(b.hi);
    un_empty  = a.empty;
    bin_empty = a.empty || b.empty;
    r = '0;
    case (op)
      OP_LOAD: r = interval_t'(data);
      OP_READ: r = a;
      OP_ADD, OP_SUB: begin
        r = bin_empty ? EMPTY : '{empty: 1'b0, lo: add_lo, iota: 1'b0, hi: add_hi};
        r.iota = bin_iota;
      end
      OP_MUL: begin
        r.lo = fp_min(fp_min(p_lo[0], p_lo[1]), fp_min(p_lo[2], p_lo[3]));
        r.hi = fp_max(fp_max(p_hi[0], p_hi[1]), fp_max(p_hi[2], p_hi[3]));
        if (bin_empty) r = EMPTY;
        r.iota = bin_iota;
      end
      OP_NEG: begin
        r = un_empty ? EMPTY : '{empty: 1'b0, lo: fp_neg(a.hi), iota: 1'b0, hi: fp_neg(a.lo)};
        r.iota = un_iota;
      end
      OP_SQR: begin
        if (!fp_lt(a.lo, FP_POS_ZERO)) begin         // 0 <= lo
          r.lo = p_lo[0];
          r.hi = p_hi[3];
        end else if (!fp_lt(FP_POS_ZERO, a.hi)) begin // hi <= 0
          r.lo = p_lo[3];
          r.hi = p_hi[0];
        end else begin                                // lo < 0 < hi
          r.lo = FP_POS_ZERO;
          r.hi = fp_max(p_hi[0], p_hi[3]);
        end
        if (un_empty) r = EMPTY;
        r.iota = un_iota;
      end
      OP_INTER: begin
        r.lo = fp_max(a.lo, b.lo);
        r.hi = fp_min(a.hi, b.hi);
        if (bin_empty || fp_lt(r.hi, r.lo)) r = EMPTY;
        r.iota = bin_iota;
      end
      OP_HULL: begin
        if (a.empty && b.empty) r = EMPTY;
        else if (a.empty)       r = b;
        else if (b.empty)       r = a;
        else begin
          r.lo = fp_min(a.lo, b.lo);
          r.hi = fp_max(a.hi, b.hi);
        end
        r.iota = bin_iota;
      end
      default: r = '0;
    endcase
  end

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op     <= OP_LOAD;
      a      <= '0;
      b      <= '0;
      data   <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && cnt == '0) begin
        op   <= op_in;
        a    <= a_in;
        b    <= b_in;
        data <= data_in;
        cnt  <= (lat_of(op_in) == '0) ? 8'd1 : lat_of(op_in);
      end else if (cnt != '0) begin
        cnt <= cnt - 8'd1;
        if (cnt == 8'd1) begin
          done   <= 1'b1;
          result <= r;
        end
      end
    end
  end

  assign busy = (cnt != '0);

endmodule
