// tb_xiv_decode: self-checking test of the fetch/decode stage. Random
// instruction words (legal ones on the custom-0 opcode and arbitrary ones)
// are presented with and without enable; the decoded fields, legality,
// write enable and the one-cycle valid pulse are checked against fields cut
// from the word by the testbench.
module tb_xiv_decode;
  import xiv_pkg::*;
  import xiv_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enable, valid;
  xiv_instr_t instr;
  xiv_dec_t   dec;
  int checks = 0, failures = 0;

  xiv_decode dut (.clk, .rst_n, .enable, .instr, .valid, .dec);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    logic exp_legal;
    xiv_dec_t held;
    enable = 0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    held = dec;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 3 == 0) w = $urandom;
      else w = mk_instr(xiv_op_e'($urandom_range(10)), int'($urandom_range(31)),
                        int'($urandom_range(31)), int'($urandom_range(31)));
      instr = '{data: {$urandom, $urandom}, word: w};
      enable = (i % 4 != 3);
      exp_legal = (w[6:0] == 7'b0001011) && (w[14:12] == 3'b000) && (w[31:25] <= 7'd8);
      @(posedge clk);
      #1;
      checks++;
      if (valid != enable) begin failures++; $display("FAIL valid"); end
      if (enable) begin
        checks++;
        if (dec.legal != exp_legal || dec.rd != w[11:7] || dec.rs1 != w[19:15] ||
            dec.rs2 != w[24:20] || dec.data != instr.data ||
            (exp_legal && (7'(dec.op) != w[31:25] || dec.wr_en != (w[31:25] != 7'd1))) ||
            (!exp_legal && dec.wr_en)) begin
          failures++;
          $display("FAIL decode of %h", w);
        end
        held = dec;
      end else begin
        checks++;
        if (dec != held) begin failures++; $display("FAIL decode changed without enable"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
