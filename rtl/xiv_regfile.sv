// xiv_regfile: the coprocessor's register file, a local copy of the RISC-V
// floating-point registers that hold intervals.
//
// NREGS 64-bit registers (32 by default, one per RISC-V f register), two
// asynchronous read ports for the two source operands and one synchronous
// write port for write-back. The host keeps the copy in step with its own
// registers through load instructions. The register count and width follow
// the published design; the port arrangement and the reset to all zeros
// (the non-empty interval [+0, +0]) are this design's own choices.
module xiv_regfile
  import xiv_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr_a,
  output interval_t            rdata_a,
  input  logic [$clog2(N)-1:0] raddr_b,
  output interval_t            rdata_b,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  interval_t            wdata
);

  interval_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
