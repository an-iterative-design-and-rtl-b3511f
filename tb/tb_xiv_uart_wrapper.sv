// tb_xiv_uart_wrapper: self-checking test of the serial access to the core.
// A bit-level host model sends 12-byte instruction frames and decodes the
// 9-byte answers on the transmit line (8N1, CLKS_PER_BIT = 8 to keep the run
// short). It loads registers, runs interval operations and reads back
// results, checking each against the exact reference; it checks the
// illegal-instruction status byte, that a frame broken by a framing error is
// discarded, and the spacing of the answer bytes on the line (back to back, 10 bits each).
module tb_xiv_uart_wrapper;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  localparam int CPB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx = 1'b1, tx;
  int checks = 0, failures = 0;

  xiv_uart_wrapper #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .uart_rx(rx), .uart_tx(tx));

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic recv_byte(output logic [7:0] b, output longint t_start);
    @(negedge tx);
    t_start = $time;
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
  endtask

  // one instruction: frame out, answer back; also returns the answer's length in cycles
  task automatic xfer(logic [31:0] w, logic [63:0] d, output logic [63:0] r,
                      output logic [7:0] st, output int ans_cycles);
    logic [95:0] f;
    logic [7:0] b;
    longint t0, t1;
    f = {d, w};
    fork
      for (int i = 0; i < 12; i++) send_byte(f[8*i +: 8]);
      begin
        for (int i = 0; i < 8; i++) begin
          recv_byte(b, t1);
          if (i == 0) t0 = t1;
          r[8*i +: 8] = b;
        end
        recv_byte(st, t1);
        ans_cycles = int'((t1 - t0) / 10);   // first to last start bit
      end
    join
  endtask

  initial begin
    logic [63:0] r;
    logic [7:0]  st;
    int cyc;
    interval_t iv [4];
    xiv_op_e ops [5] = '{OP_ADD, OP_SUB, OP_MUL, OP_INTER, OP_HULL};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      iv[i] = rand_iv(55, 70, 0);
      xfer(mk_instr(OP_LOAD, i, 0, 0), 64'(iv[i]), r, st, cyc);
      checks++;
      if (st != 8'd0 || r != 64'(iv[i])) begin failures++; $display("FAIL load %0d", i); end
    end
    checks++;
    // bytes go out back to back, with at most one idle cycle between them
    if (cyc < 8 * 10 * CPB || cyc > 8 * (10 * CPB + 1)) begin failures++; $display("FAIL answer length %0d cycles", cyc); end
    foreach (ops[k]) begin
      xfer(mk_instr(ops[k], 10 + k, k % 4, (k + 1) % 4), '0, r, st, cyc);
      checks++;
      if (st != 8'd0 || !check_interval(ops[k], iv[k % 4], iv[(k + 1) % 4], '0, interval_t'(r))) begin
        failures++; $display("FAIL %s over UART: %h", ops[k].name(), r);
      end
    end
    xfer(mk_instr(OP_READ, 0, 12, 0), '0, r, st, cyc);   // read back the product
    checks++;
    if (!check_interval(OP_MUL, iv[2], iv[3], '0, interval_t'(r))) begin
      failures++; $display("FAIL read back");
    end
    xfer(32'hFFFF_FFFF, '0, r, st, cyc);
    checks++;
    if (st != 8'd1) begin failures++; $display("FAIL illegal status %h", st); end
    // a broken frame: three bytes, the last without its stop bit, then a full frame
    send_byte(8'h0B);
    send_byte(8'h00);
    send_byte(8'h55, 1'b0);
    repeat (4 * CPB) @(posedge clk);
    xfer(mk_instr(OP_READ, 0, 1, 0), '0, r, st, cyc);
    checks++;
    if (st != 8'd0 || r != 64'(iv[1])) begin failures++; $display("FAIL resync after framing error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
