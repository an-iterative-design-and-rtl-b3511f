// xiv_top: FPGA side of the xinterval coprocessor, with both host links.
//
// The interval core is reached by a host that runs a RISC-V instruction-set
// simulator and hands each custom instruction to the hardware. Two links are
// built side by side, each with its own core instance:
//   * AXI4-Lite slave (xiv_axil_wrapper): the efficient link of the Zynq
//     deployment, where the simulator runs on the processing system and the
//     core sits in the programmable logic;
//   * UART (xiv_uart_wrapper): the cheap serial link of the first FPGA
//     integration, with one request/answer frame per instruction.
// The two instances share the clock and reset and nothing else. Parameters
// pass through to the wrappers; their defaults are this design's own choices
// (the operator latencies and the baud rate are not published).
module xiv_top
  import xiv_pkg::*;
#(
  parameter int unsigned ADDR_W       = 8,
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned LAT_ADD      = 1,
  parameter int unsigned LAT_MUL      = 1,
  parameter int unsigned LAT_MISC     = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // UART
  input  logic              uart_rx,
  output logic              uart_tx
);

  xiv_axil_wrapper #(
    .ADDR_W(ADDR_W), .LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .LAT_MISC(LAT_MISC)
  ) u_axil (
    .aclk(clk), .aresetn(rst_n),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready
  );

  xiv_uart_wrapper #(
    .CLKS_PER_BIT(CLKS_PER_BIT), .LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .LAT_MISC(LAT_MISC)
  ) u_uart (
    .clk, .rst_n,
    .uart_rx, .uart_tx
  );

endmodule
