// tb_xiv_core: end-to-end test of the xinterval core through its
// instruction/result interface, as a host would drive it.
// Registers 0-15 are loaded with random intervals; random operations read
// them and write registers 16-31; every result is checked against the exact
// double-precision reference, and a shadow copy of the register file is
// compared with read-back instructions. Also checked: the latency from
// enable to done (LAT + 2 = 3 cycles), illegal instructions (done with the
// illegal flag, no register written) and that enable is ignored while busy.
module tb_xiv_core;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        enable, done, illegal, busy;
  xiv_instr_t  instr;
  logic [63:0] result;
  interval_t   shadow [32];
  int checks = 0, failures = 0;
  int n_done = 0;

  xiv_core dut (.clk, .rst_n, .enable, .instr, .result, .done, .illegal, .busy);

  always @(posedge clk) if (done) n_done++;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one instruction; returns result, illegal flag and cycles to done
  task automatic issue(logic [31:0] w, logic [63:0] d, output logic [63:0] r,
                       output logic ill, output int lat);
    @(negedge clk);
    instr = '{data: d, word: w};
    enable = 1'b1;
    @(posedge clk);
    #1;
    enable = 1'b0;
    lat = 0;
    while (!done && lat < 50) begin
      @(posedge clk);
      #1;
      lat++;
    end
    r = result;
    ill = illegal;
  endtask

  task automatic expect_lat(int lat, int want);
    checks++;
    if (lat != want) begin failures++; $display("FAIL latency %0d, expected %0d", lat, want); end
  endtask

  localparam xiv_op_e OPS [7] = '{OP_ADD, OP_SUB, OP_MUL, OP_NEG, OP_SQR, OP_INTER, OP_HULL};

  initial begin
    logic [63:0] r;
    logic ill;
    int lat, rd, rs1, rs2, n_before;
    xiv_op_e op;
    enable = 0; instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) shadow[i] = '0;

    for (int k = 0; k < 400; k++) begin
      if (k % 20 == 0) begin
        // refresh the source registers, as the host does when its f registers change
        for (int i = 0; i < 16; i++) begin
          shadow[i] = rand_iv(50, 76, 4);
          issue(mk_instr(OP_LOAD, i, 0, 0), 64'(shadow[i]), r, ill, lat);
          expect_lat(lat, 2);
        end
      end
      op  = OPS[$urandom_range(6)];
      rd  = 16 + int'($urandom_range(15));
      rs1 = int'($urandom_range(15));
      rs2 = int'($urandom_range(15));
      issue(mk_instr(op, rd, rs1, rs2), {$urandom, $urandom}, r, ill, lat);
      expect_lat(lat, 2);
      checks++;
      if (ill || !check_interval(op, shadow[rs1], shadow[rs2], '0, interval_t'(r))) begin
        failures++;
        if (failures < 10) $display("FAIL %s r%0d r%0d -> %h", op.name(), rs1, rs2, r);
      end
      shadow[rd] = interval_t'(r);
      // read back a random register
      rs1 = int'($urandom_range(31));
      issue(mk_instr(OP_READ, 0, rs1, 0), '0, r, ill, lat);
      checks++;
      if (r != 64'(shadow[rs1])) begin failures++; $display("FAIL read r%0d", rs1); end
    end

    // illegal instructions: wrong opcode, wrong funct3, unknown funct7
    begin
      logic [31:0] bad [3];
      bad[0] = mk_instr(OP_ADD, 20, 1, 2) ^ 32'h0000_0040;
      bad[1] = mk_instr(OP_ADD, 20, 1, 2) | 32'h0000_1000;
      bad[2] = {7'd99, 5'd2, 5'd1, 3'd0, 5'd20, OPC_CUSTOM0};
      foreach (bad[i]) begin
        issue(bad[i], {$urandom, $urandom}, r, ill, lat);
        checks += 2;
        if (!ill || r != '0) begin failures++; $display("FAIL illegal %0d not flagged", i); end
        if (lat != 1) begin failures++; $display("FAIL illegal latency %0d", lat); end
      end
      issue(mk_instr(OP_READ, 0, 20, 0), '0, r, ill, lat);
      checks++;
      if (r != 64'(shadow[20])) begin failures++; $display("FAIL illegal instruction wrote r20"); end
    end

    // enable while busy is ignored: a load right behind an add must not happen
    @(posedge clk);   // let the counter see the previous done pulse
    #1;
    n_before = n_done;
    @(negedge clk);
    instr = '{data: '0, word: mk_instr(OP_ADD, 21, 1, 2)};
    enable = 1'b1;
    @(negedge clk);
    instr = '{data: 64'hDEAD_BEEF_0000_0001, word: mk_instr(OP_LOAD, 22, 0, 0)};
    @(negedge clk);
    enable = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (n_done - n_before != 1) begin failures++; $display("FAIL busy: %0d done pulses", n_done - n_before); end
    issue(mk_instr(OP_READ, 0, 22, 0), '0, r, ill, lat);
    checks++;
    if (r != 64'(shadow[22])) begin failures++; $display("FAIL load issued while busy"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
