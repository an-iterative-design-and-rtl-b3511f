// tb_xiv_execute: self-checking test of the interval execute stage.
// Every operation is run on random intervals (some empty, some with zero
// bounds, some with the iota flag) and the result is checked against the
// exact double-precision reference of xiv_tb_pkg. Two instances run side by
// side: one with the default latencies and one with LAT_ADD=2, LAT_MUL=4,
// LAT_MISC=3; the cycle count from start to done is checked on both.
module tb_xiv_execute;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  xiv_op_e     op;
  interval_t   a, b;
  logic [63:0] data;
  logic        busy0, done0, busy1, done1;
  interval_t   res0, res1;
  int checks = 0, failures = 0;

  xiv_execute dut0 (.clk, .rst_n, .start, .op_in(op), .a_in(a), .b_in(b), .data_in(data),
                    .busy(busy0), .done(done0), .result(res0));
  xiv_execute #(.LAT_ADD(2), .LAT_MUL(4), .LAT_MISC(3)) dut1 (
                    .clk, .rst_n, .start, .op_in(op), .a_in(a), .b_in(b), .data_in(data),
                    .busy(busy1), .done(done1), .result(res1));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat1(xiv_op_e o);
    case (o)
      OP_ADD, OP_SUB: return 2;
      OP_MUL, OP_SQR: return 4;
      default: return 3;
    endcase
  endfunction

  task automatic run(xiv_op_e top, interval_t ta, interval_t tb_, logic [63:0] td);
    int n, t0 = -1, t1 = -1;
    @(negedge clk);
    op = top; a = ta; b = tb_; data = td; start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    a = '0; b = '0;  // operands must have been captured
    for (n = 0; n <= 6; n++) begin  // n = clock edges after the one that took start
      if (done0 && t0 < 0) begin
        t0 = n;
        checks++;
        if (!check_interval(top, ta, tb_, td, res0)) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s a=%h b=%h r=%h", top.name(), ta, tb_, res0);
        end
      end
      if (done1 && t1 < 0) begin
        t1 = n;
        checks++;
        if (res1 != res0) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s latency instance differs", top.name());
        end
      end
      @(posedge clk);
      #1;
    end
    checks += 2;
    if (t0 != 1)          begin failures++; $display("FAIL latency dut0 %0d", t0); end
    if (t1 != lat1(top))  begin failures++; $display("FAIL latency dut1 %0d op %s", t1, top.name()); end
  endtask

  localparam xiv_op_e OPS [9] = '{OP_LOAD, OP_READ, OP_ADD, OP_SUB, OP_MUL, OP_NEG,
                                  OP_SQR, OP_INTER, OP_HULL};

  initial begin
    interval_t ta, tb_;
    start = 0; op = OP_LOAD; a = '0; b = '0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: [1,2] * [-3,4] = [-6, 8]
    ta = '{empty: 0, lo: r2fp_exact(1.0), iota: 0, hi: r2fp_exact(2.0)};
    tb_ = '{empty: 0, lo: r2fp_exact(-3.0), iota: 0, hi: r2fp_exact(4.0)};
    run(OP_MUL, ta, tb_, '0);
    checks++;
    if (res0.lo != r2fp_exact(-6.0) || res0.hi != r2fp_exact(8.0)) begin
      failures++; $display("FAIL directed mul %h", res0);
    end
    // [-3,4]^2 = [0,16]; [1,2] inter [-3,4] = [1,2]; disjoint intersection is empty
    run(OP_SQR, tb_, tb_, '0);
    checks++;
    if (res0.lo != 31'd0 || res0.hi != r2fp_exact(16.0)) begin failures++; $display("FAIL sqr"); end
    ta.lo = r2fp_exact(5.0); ta.hi = r2fp_exact(6.0);
    run(OP_INTER, ta, tb_, '0);
    checks++;
    if (!res0.empty) begin failures++; $display("FAIL disjoint intersection"); end
    // an unbounded interval times one that contains zero
    ta = '{empty: 0, lo: 31'h7F80_0000, iota: 0, hi: r2fp_exact(1.0)};
    tb_ = '{empty: 0, lo: 31'd0, iota: 0, hi: r2fp_exact(2.0)};
    run(OP_MUL, ta, tb_, '0);
    checks++;
    if (res0.lo != 31'h7F80_0000 || res0.hi != r2fp_exact(2.0)) begin
      failures++; $display("FAIL unbounded mul %h", res0);
    end
    // NaN bound sets iota
    ta = '{empty: 0, lo: FP_QNAN, iota: 0, hi: r2fp_exact(1.0)};
    run(OP_ADD, ta, tb_, '0);
    checks++;
    if (!res0.iota) begin failures++; $display("FAIL iota from NaN"); end
    // random
    for (int i = 0; i < 3000; i++) begin
      ta  = rand_iv(50, 76, 5);
      tb_ = rand_iv(50, 76, 5);
      if (i % 50 == 0) ta.iota = 1'b1;
      if (i % 9 == 0) tb_ = ta;       // equal / overlapping operands
      run(OPS[i % 9], ta, tb_, {$urandom, $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
