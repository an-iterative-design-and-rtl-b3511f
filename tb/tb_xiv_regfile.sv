// tb_xiv_regfile: self-checking test of the interval register file. Checks
// the reset value, random writes against a shadow array on both read ports,
// and that a write becomes visible only after the clock edge.
module tb_xiv_regfile;
  import xiv_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] ra, rb, wa;
  interval_t  da, db, wd;
  logic       we;
  interval_t  shadow [32];
  int checks = 0, failures = 0;

  xiv_regfile dut (.clk, .rst_n, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
                   .we, .waddr(wa), .wdata(wd));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      shadow[i] = '0;
      ra = 5'(i); #1;
      checks++;
      if (da != '0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 5'($urandom);
      wd = {$urandom, $urandom};
      ra = wa;
      rb = 5'($urandom);
      #1;
      checks += 2;
      if (da != shadow[ra]) begin failures++; $display("FAIL port a r%0d before write", ra); end
      if (db != shadow[rb]) begin failures++; $display("FAIL port b r%0d", rb); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      checks++;
      if (da != shadow[ra]) begin failures++; $display("FAIL port a r%0d after write", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
