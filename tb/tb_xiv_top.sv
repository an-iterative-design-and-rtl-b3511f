// tb_xiv_top: end-to-end test of the whole FPGA side at its default
// parameters (115200 baud from a 100 MHz clock on the serial link).
// A host model evaluates, over a box [x] x [y], the two radius terms of a
// SIVIA-style test constraint, (x - 4)^2 + y^2 and x^2 + y^2, as a sequence of
// interval instructions (load, sub, sqr, add, read), once through the
// AXI4-Lite link and once through the UART link, and checks both answers
// against the exact reference and against each other. It then exercises the
// remaining mechanisms and counts how often each happened; a mechanism that
// never happened is a failure: every interval operation, an empty
// intersection, iota propagation, an illegal instruction on each link, an
// INSTR write dropped while the core is busy, AXI write-response
// back-pressure, and a UART framing error followed by a clean frame.
module tb_xiv_top;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  localparam int CPB = 868;   // the top's default CLKS_PER_BIT

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        rx = 1'b1, tx;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_op [9];
  int n_empty = 0, n_iota = 0, n_illegal_axi = 0, n_illegal_uart = 0, n_drop = 0;
  int n_bp = 0, n_frame_err = 0;

  xiv_top dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .uart_rx(rx), .uart_tx(tx));

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite host ----------------
  task automatic axi_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1; wvalid = 1;
    bready = ($urandom_range(1) == 1);
    do begin
      logic aw_hs, w_hs;
      @(posedge clk);
      aw_hs = awvalid && awready;
      w_hs  = wvalid && wready;
      #1;
      if (aw_hs) awvalid = 0;
      if (w_hs) wvalid = 0;
    end while (awvalid || wvalid);
    #1;
    while (!bvalid) begin @(posedge clk); #1; end
    if (!bready) begin
      @(posedge clk);
      #1;
      if (bvalid) n_bp++;     // response held while not taken
      bready = 1;
    end
    @(posedge clk);
    #1;
    bready = 0;
  endtask

  // two writes to one address at the fastest pace the slave allows
  task automatic axi_write_b2b(logic [7:0] a, logic [31:0] d1, logic [31:0] d2);
    for (int k = 0; k < 2; k++) begin
      logic aw_hs, w_hs;
      @(negedge clk);
      awaddr = a; wdata = (k == 0) ? d1 : d2; wstrb = 4'hF;
      awvalid = 1; wvalid = 1; bready = 1;
      do begin
        @(posedge clk);
        aw_hs = awvalid && awready;
        w_hs  = wvalid && wready;
        #1;
        if (aw_hs) awvalid = 0;
        if (w_hs) wvalid = 0;
      end while (awvalid || wvalid);
    end
    while (!bvalid) begin @(posedge clk); #1; end
    @(posedge clk);
    #1;
    bready = 0;
  endtask

  task automatic axi_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    #1;
    arvalid = 0;
    while (!rvalid) begin @(posedge clk); #1; end
    d = rdata;
    @(posedge clk);
    #1;
    rready = 0;
  endtask

  task automatic axi_run(logic [31:0] w, logic [63:0] d, output logic [63:0] r, output logic ill);
    logic [31:0] st;
    axi_write(8'h04, d[31:0]);
    axi_write(8'h08, d[63:32]);
    axi_write(8'h00, w);
    do axi_read(8'h18, st); while (!st[0]);
    axi_read(8'h10, r[31:0]);
    axi_read(8'h14, r[63:32]);
    ill = st[2];
  endtask

  // ---------------- UART host ----------------
  task automatic send_byte(logic [7:0] b, logic stop = 1'b1);
    rx = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (CPB) @(posedge clk);
    end
    rx = stop;
    repeat (CPB) @(posedge clk);
    rx = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    @(negedge tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk);
  endtask

  task automatic uart_run(logic [31:0] w, logic [63:0] d, output logic [63:0] r, output logic ill);
    logic [95:0] f;
    logic [7:0] b, st;
    f = {d, w};
    fork
      for (int i = 0; i < 12; i++) send_byte(f[8*i +: 8]);
      begin
        for (int i = 0; i < 8; i++) begin
          recv_byte(b);
          r[8*i +: 8] = b;
        end
        recv_byte(st);
      end
    join
    ill = st[0];
  endtask

  // ---------------- one instruction on either link, checked ----------------
  interval_t shadow [2][32];

  task automatic exec(int link, xiv_op_e op, int rd, int rs1, int rs2, logic [63:0] d,
                      output interval_t res);
    logic [63:0] r;
    logic ill;
    if (link == 0) axi_run(mk_instr(op, rd, rs1, rs2), d, r, ill);
    else           uart_run(mk_instr(op, rd, rs1, rs2), d, r, ill);
    res = interval_t'(r);
    checks++;
    if (ill || !check_interval(op, shadow[link][rs1], shadow[link][rs2], d, res)) begin
      failures++;
      $display("FAIL link %0d %s r%0d r%0d -> %h", link, op.name(), rs1, rs2, r);
    end
    n_op[int'(op)]++;
    if (res.empty) n_empty++;
    if (res.iota && op != OP_LOAD && op != OP_READ) n_iota++;
    if (op != OP_READ) shadow[link][rd] = res;
  endtask

  // the radius terms of the test constraint over a box, on one link
  task automatic radius_terms(int link, interval_t x, interval_t y,
                              output interval_t t1, output interval_t t2);
    interval_t four, tmp;
    four = '{empty: 0, lo: r2fp_exact(4.0), iota: 0, hi: r2fp_exact(4.0)};
    exec(link, OP_LOAD, 1, 0, 0, 64'(x), tmp);
    exec(link, OP_LOAD, 2, 0, 0, 64'(y), tmp);
    exec(link, OP_LOAD, 3, 0, 0, 64'(four), tmp);
    exec(link, OP_SUB, 4, 1, 3, '0, tmp);    // x - 4
    exec(link, OP_SQR, 4, 4, 0, '0, tmp);    // (x - 4)^2
    exec(link, OP_SQR, 5, 2, 0, '0, tmp);    // y^2
    exec(link, OP_ADD, 6, 4, 5, '0, tmp);    // (x - 4)^2 + y^2
    exec(link, OP_SQR, 7, 1, 0, '0, tmp);    // x^2
    exec(link, OP_ADD, 8, 7, 5, '0, tmp);    // x^2 + y^2
    exec(link, OP_READ, 0, 6, 0, '0, t1);
    exec(link, OP_READ, 0, 8, 0, '0, t2);
  endtask

  initial begin
    interval_t x, y, a1, a2, u1, u2, tmp;
    logic [63:0] r;
    logic ill;
    logic [31:0] st;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    foreach (n_op[i]) n_op[i] = 0;
    for (int l = 0; l < 2; l++) for (int i = 0; i < 32; i++) shadow[l][i] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // box [-1.5, 2.25] x [-6, 0.75]
    x = '{empty: 0, lo: r2fp_exact(-1.5), iota: 0, hi: r2fp_exact(2.25)};
    y = '{empty: 0, lo: r2fp_exact(-6.0), iota: 0, hi: r2fp_exact(0.75)};
    radius_terms(0, x, y, a1, a2);
    radius_terms(1, x, y, u1, u2);
    checks += 3;
    if (a1 != u1 || a2 != u2) begin failures++; $display("FAIL links disagree"); end
    // exact values: (x-4)^2 + y^2 = [1.75^2 + 0, 5.5^2 + 36] = [3.0625, 66.25]
    if (a1.lo != r2fp_exact(3.0625) || a1.hi != r2fp_exact(66.25)) begin
      failures++; $display("FAIL (x-4)^2+y^2 = %h", a1);
    end
    // x^2 + y^2 = [0, 5.0625 + 36] = [0, 41.0625]
    if (a2.lo != 31'd0 || a2.hi != r2fp_exact(41.0625)) begin
      failures++; $display("FAIL x^2+y^2 = %h", a2);
    end

    // the remaining operations on the AXI link, with random boxes
    for (int k = 0; k < 40; k++) begin
      exec(0, OP_LOAD, 10, 0, 0, 64'(rand_iv(55, 70, 10)), tmp);
      exec(0, OP_LOAD, 11, 0, 0, 64'(rand_iv(55, 70, 10)), tmp);
      exec(0, OP_MUL, 12, 10, 11, '0, tmp);
      exec(0, OP_NEG, 13, 10, 0, '0, tmp);
      exec(0, OP_INTER, 14, 10, 11, '0, tmp);
      exec(0, OP_HULL, 15, 10, 11, '0, tmp);
    end
    // iota propagation
    tmp = x; tmp.iota = 1'b1;
    exec(0, OP_LOAD, 16, 0, 0, 64'(tmp), tmp);
    exec(0, OP_ADD, 17, 16, 1, '0, tmp);
    // a sure empty intersection
    exec(0, OP_INTER, 18, 1, 3, '0, tmp);

    // illegal instruction on both links
    axi_run(32'h0000_0033, '0, r, ill);
    checks++;
    if (ill) n_illegal_axi++; else begin failures++; $display("FAIL illegal on AXI"); end
    uart_run(32'h0000_0033, '0, r, ill);
    checks++;
    if (ill) n_illegal_uart++; else begin failures++; $display("FAIL illegal on UART"); end

    // INSTR write while busy is dropped: issue two INSTR writes back to back
    axi_write_b2b(8'h00, mk_instr(OP_NEG, 20, 1, 0), mk_instr(OP_LOAD, 20, 0, 0));
    do axi_read(8'h18, st); while (!st[0]);
    shadow[0][20] = '{empty: 0, lo: fp_neg(x.hi), iota: 0, hi: fp_neg(x.lo)};
    exec(0, OP_READ, 0, 20, 0, '0, tmp);
    checks++;
    if (tmp.lo == fp_neg(x.hi) && tmp.hi == fp_neg(x.lo)) n_drop++;
    else begin failures++; $display("FAIL second INSTR write was not dropped"); end

    // UART framing error, then a clean frame
    send_byte(8'h0B);
    send_byte(8'h77, 1'b0);
    n_frame_err++;
    repeat (4 * CPB) @(posedge clk);
    exec(1, OP_READ, 0, 6, 0, '0, tmp);
    checks++;
    if (tmp != u1) begin failures++; $display("FAIL UART resync"); end

    // every mechanism must have happened
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL operation %0d never ran", i); end
    end
    checks += 7;
    if (n_empty == 0)        begin failures++; $display("FAIL no empty result"); end
    if (n_iota == 0)         begin failures++; $display("FAIL no iota propagation"); end
    if (n_illegal_axi == 0)  begin failures++; $display("FAIL no illegal on AXI"); end
    if (n_illegal_uart == 0) begin failures++; $display("FAIL no illegal on UART"); end
    if (n_drop == 0)         begin failures++; $display("FAIL no dropped write"); end
    if (n_bp == 0)           begin failures++; $display("FAIL no write-response back-pressure"); end
    if (n_frame_err == 0)    begin failures++; $display("FAIL no framing error"); end
    $display("mechanisms: ops load=%0d read=%0d add=%0d sub=%0d mul=%0d neg=%0d sqr=%0d inter=%0d hull=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8]);
    $display("mechanisms: empty=%0d iota=%0d illegal_axi=%0d illegal_uart=%0d dropped=%0d backpressure=%0d frame_err=%0d",
             n_empty, n_iota, n_illegal_axi, n_illegal_uart, n_drop, n_bp, n_frame_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
