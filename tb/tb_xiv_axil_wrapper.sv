// tb_xiv_axil_wrapper: self-checking test of the AXI4-Lite access to the
// core. A host model writes the data and instruction registers, polls STATUS
// and reads RESULT, as a driver on the processing system would. Covered:
// loads and interval operations checked against the exact reference, address
// and data channels arriving in either order or together, back-pressure on
// the response channels, byte strobes, unmapped addresses, the illegal flag,
// the busy flag, and an INSTR write during a long multiply (LAT_MUL = 8
// here) that must not be issued.
module tb_xiv_axil_wrapper;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  int checks = 0, failures = 0;

  xiv_axil_wrapper #(.LAT_MUL(8)) dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(logic [7:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    int order;
    bit aw_done, w_done;
    order = int'($urandom_range(2));   // 0: together, 1: address first, 2: data first
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s;
    awvalid = (order != 2);
    wvalid  = (order != 1);
    aw_done = 0; w_done = 0;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready) w_done = 1;
      #1;
      if (aw_done) awvalid = 0; else awvalid = 1;
      if (w_done) wvalid = 0; else wvalid = 1;
    end
    bready = 0;
    repeat ($urandom_range(2)) @(posedge clk);
    #1;
    bready = 1;
    do @(posedge clk); while (!bvalid);
    #1;
    bready = 0;
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL bresp"); end
  endtask

  task automatic axi_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 0;
    do @(posedge clk); while (!arready);
    #1;
    arvalid = 0;
    repeat ($urandom_range(2)) @(posedge clk);
    #1;
    rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    #1;
    rready = 0;
  endtask

  task automatic run(logic [31:0] w, logic [63:0] d, output logic [63:0] r, output logic [31:0] st);
    axi_write(8'h04, d[31:0]);
    axi_write(8'h08, d[63:32]);
    axi_write(8'h00, w);
    do axi_read(8'h18, st); while (!st[0]);
    axi_read(8'h10, r[31:0]);
    axi_read(8'h14, r[63:32]);
  endtask

  initial begin
    logic [63:0] r;
    logic [31:0] st, v;
    interval_t iv [8];
    xiv_op_e ops [7] = '{OP_ADD, OP_SUB, OP_MUL, OP_NEG, OP_SQR, OP_INTER, OP_HULL};
    int k1, k2;
    logic saw_busy;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 8; i++) begin
      iv[i] = rand_iv(55, 70, 5);
      run(mk_instr(OP_LOAD, i, 0, 0), 64'(iv[i]), r, st);
      checks++;
      if (r != 64'(iv[i]) || st[2]) begin failures++; $display("FAIL load %0d", i); end
    end
    for (int k = 0; k < 60; k++) begin
      k1 = int'($urandom_range(7));
      k2 = int'($urandom_range(7));
      run(mk_instr(ops[k % 7], 20, k1, k2), '0, r, st);
      checks++;
      if (st[2] || !check_interval(ops[k % 7], iv[k1], iv[k2], '0, interval_t'(r))) begin
        failures++; $display("FAIL %s via AXI: %h", ops[k % 7].name(), r);
      end
    end
    // register read-back and byte strobes
    axi_write(8'h04, 32'h1122_3344);
    axi_write(8'h04, 32'hAABB_CCDD, 4'b0101);
    axi_read(8'h04, v);
    checks++;
    if (v != 32'h11BB_33DD) begin failures++; $display("FAIL strobes %h", v); end
    axi_read(8'h3C, v);
    checks++;
    if (v != 32'd0) begin failures++; $display("FAIL unmapped read %h", v); end
    // illegal instruction
    run(32'h0000_0013, '0, r, st);
    checks++;
    if (!st[2] || r != '0) begin failures++; $display("FAIL illegal flag"); end
    // busy: a multiply takes 8 cycles; a second INSTR write in that time is dropped
    axi_write(8'h00, mk_instr(OP_MUL, 21, 1, 2));
    axi_read(8'h18, st);
    saw_busy = st[1];
    axi_write(8'h00, mk_instr(OP_NEG, 21, 3, 0));
    do axi_read(8'h18, st); while (!st[0]);
    axi_read(8'h10, r[31:0]);
    axi_read(8'h14, r[63:32]);
    checks += 2;
    if (!saw_busy) begin failures++; $display("FAIL busy flag not seen"); end
    if (!check_interval(OP_MUL, iv[1], iv[2], '0, interval_t'(r))) begin
      failures++; $display("FAIL write during busy was issued");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
