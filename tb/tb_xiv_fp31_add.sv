// tb_xiv_fp31_add: self-checking test of the directed-rounding bound adder.
// Random operands (normal, subnormal, near overflow) are added and subtracted
// in both rounding directions; each result is checked against the exact sum
// computed in double precision (see xiv_tb_pkg). Special values (infinities,
// NaN, signed zero) are checked against fixed expectations.
module tb_xiv_fp31_add;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  fp31_t a, b, y;
  logic  b_neg, up;
  int    checks = 0, failures = 0;

  xiv_fp31_add dut (.a(a), .b(b), .b_neg(b_neg), .up(up), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_exact(fp31_t ta, fp31_t tb_, logic tn, logic tu);
    real x;
    a = ta; b = tb_; b_neg = tn; up = tu;
    #1;
    x = tn ? fp2r(ta) - fp2r(tb_) : fp2r(ta) + fp2r(tb_);
    checks++;
    if (!check_dir(y, x, tu)) begin
      failures++;
      if (failures < 10)
        $display("FAIL add a=%h b=%h neg=%0d up=%0d y=%h (%g) exact %g", ta, tb_, tn, tu, y, fp2r(y), x);
    end
  endtask

  task automatic chk_val(fp31_t ta, fp31_t tb_, logic tn, logic tu, fp31_t exp_y);
    a = ta; b = tb_; b_neg = tn; up = tu;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL add special a=%h b=%h neg=%0d up=%0d y=%h expected %h", ta, tb_, tn, tu, y, exp_y);
    end
  endtask

  localparam fp31_t PINF = 31'h3F80_0000;
  localparam fp31_t NINF = 31'h7F80_0000;
  localparam fp31_t ONE  = {1'b0, 7'd63, 23'd0};
  localparam fp31_t MAXF = 31'h3F7F_FFFF;

  initial begin
    fp31_t ta, tb_;
    int ea;
    // fixed cases
    chk_val(ONE, ONE, 1'b0, 1'b0, {1'b0, 7'd64, 23'd0});      // 1 + 1 = 2
    chk_val(NINF, NINF, 1'b1, 1'b0, FP_QNAN);                 // -inf - -inf
    chk_val(ONE, ONE, 1'b1, 1'b0, 31'h4000_0000);             // 1 - 1 = -0 rounding down
    chk_val(ONE, ONE, 1'b1, 1'b1, 31'h0000_0000);             // 1 - 1 = +0 rounding up
    chk_val(PINF, ONE, 1'b0, 1'b0, PINF);
    chk_val(NINF, PINF, 1'b1, 1'b1, NINF);                    // -inf - +inf
    chk_val(MAXF, MAXF, 1'b0, 1'b1, PINF);                    // overflow rounding up
    chk_val(MAXF, MAXF, 1'b0, 1'b0, MAXF);                    // overflow rounding down
    chk_val(31'h3FC0_0000, ONE, 1'b0, 1'b0, FP_QNAN);         // NaN in
    chk_val(ONE, 31'h0000_0001, 1'b0, 1'b1, next_up(ONE));    // 1 + tiny, round up
    chk_val(ONE, 31'h0000_0001, 1'b0, 1'b0, ONE);             // 1 + tiny, round down
    chk_val(ONE, 31'h0000_0001, 1'b1, 1'b0, next_down(ONE));  // 1 - tiny, round down
    // random, exponent difference small enough for an exact double sum
    for (int i = 0; i < 20000; i++) begin
      case (i % 4)
        0: ea = 1 + int'($urandom_range(125));
        1: ea = int'($urandom_range(3));          // subnormal range
        2: ea = 120 + int'($urandom_range(6));    // near overflow
        default: ea = 60 + int'($urandom_range(6));
      endcase
      ta  = rand_fp(ea, ea);
      tb_ = rand_fp(clampi(ea - 28, 0, 126), clampi(ea + 28, 0, 126));
      if (i % 7 == 0) tb_ = {~ta[30], ta[29:0] ^ 30'(1 << $urandom_range(4))}; // heavy cancellation
      chk_exact(ta, tb_, 1'($urandom), 1'($urandom));
    end
    // sticky path: the smaller operand is far below the larger one
    for (int i = 0; i < 2000; i++) begin
      ta  = rand_fp(90, 110);
      tb_ = rand_fp(40, 60);
      a = ta; b = tb_; b_neg = 1'($urandom); up = 1'($urandom);
      #1;
      checks++;
      // |b| < ulp(a)/2: the result is a or its neighbour in the rounding direction
      if (y !== (((!tb_[30]) ^ b_neg) == up
                 ? (up ? next_up(ta) : next_down(ta)) : ta)) begin
        failures++;
        if (failures < 10) $display("FAIL sticky a=%h b=%h neg=%0d up=%0d y=%h", ta, tb_, b_neg, up, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
