// tb_xiv_fp31_mul: self-checking test of the directed-rounding bound
// multiplier. Random operands over the whole exponent range (so products
// overflow, underflow into subnormals and flush to zero) are multiplied in
// both rounding directions and checked against the exact double-precision
// product; specials are checked against fixed expectations.
module tb_xiv_fp31_mul;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  fp31_t a, b, y, y_dn, y_up;
  logic  up;
  int    checks = 0, failures = 0;

  xiv_fp31_mul dut (.a(a), .b(b), .y_dn(y_dn), .y_up(y_up));
  assign y = up ? y_up : y_dn;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_exact(fp31_t ta, fp31_t tb_, logic tu);
    real x;
    a = ta; b = tb_; up = tu;
    #1;
    x = fp2r(ta) * fp2r(tb_);
    checks++;
    if (!check_dir(y, x, tu)) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul a=%h b=%h up=%0d y=%h (%g) exact %g", ta, tb_, tu, y, fp2r(y), x);
    end
  endtask

  task automatic chk_val(fp31_t ta, fp31_t tb_, logic tu, fp31_t exp_y);
    a = ta; b = tb_; up = tu;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL mul special a=%h b=%h up=%0d y=%h expected %h", ta, tb_, tu, y, exp_y);
    end
  endtask

  localparam fp31_t PINF = 31'h3F80_0000;
  localparam fp31_t NINF = 31'h7F80_0000;
  localparam fp31_t ONE  = {1'b0, 7'd63, 23'd0};
  localparam fp31_t THREE = {1'b0, 7'd64, 23'h40_0000};

  initial begin
    fp31_t ta, tb_;
    chk_val(THREE, THREE, 1'b0, {1'b0, 7'd66, 23'h10_0000});  // 3 * 3 = 9
    chk_val(PINF, THREE, 1'b1, PINF);
    chk_val(NINF, THREE, 1'b0, NINF);
    chk_val(PINF, 31'h4000_0000, 1'b0, 31'h4000_0000);         // +inf * -0 = -0
    chk_val(31'h3FC0_0000, ONE, 1'b1, FP_QNAN);
    chk_val(31'h0000_0001, 31'h0000_0001, 1'b1, 31'h0000_0001); // tiny*tiny up -> min subnormal
    chk_val(31'h0000_0001, 31'h0000_0001, 1'b0, 31'h0000_0000); // tiny*tiny down -> +0
    chk_val(31'h4000_0001, 31'h0000_0001, 1'b0, 31'h4000_0001); // -tiny*tiny down -> -min subnormal
    for (int i = 0; i < 30000; i++) begin
      case (i % 4)
        0: begin ta = rand_fp(0, 126); tb_ = rand_fp(0, 126); end
        1: begin ta = rand_fp(20, 50); tb_ = rand_fp(0, 30); end    // underflow region
        2: begin ta = rand_fp(90, 126); tb_ = rand_fp(60, 100); end // overflow region
        default: begin ta = rand_fp(55, 70); tb_ = rand_fp(55, 70); end
      endcase
      chk_exact(ta, tb_, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
