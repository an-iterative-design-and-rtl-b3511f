// xiv_uart_wrapper: serial access to the xinterval core over a UART, for a
// cheap first hardware integration on an FPGA.
//
// Frame protocol (this design's own; the published flow only states that the
// core is reached through a serial link): the host sends 12 bytes, the 32-bit
// instruction word then the 64-bit data word, each least significant byte
// first. Once the 12th byte arrives the wrapper issues the instruction to the
// core; when the core reports done, the wrapper answers with 9 bytes: the
// 64-bit result, least significant byte first, then a status byte whose
// bit 0 is the illegal-instruction flag. Bytes received while an answer is
// still being computed or sent are dropped, so the host must wait for the
// answer of each instruction. A framing error (missing stop bit) discards
// the partly received frame. The round trip of 21 bytes per instruction is
// what makes this link slow next to the AXI-Lite one.
// Line format: 8N1, CLKS_PER_BIT = clock frequency / baud rate (868 gives
// 115200 baud from 100 MHz).
module xiv_uart_wrapper
  import xiv_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned LAT_ADD  = 1,
  parameter int unsigned LAT_MUL  = 1,
  parameter int unsigned LAT_MISC = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rx,
  output logic uart_tx
);

  typedef enum logic [1:0] {W_RECV, W_EXEC, W_SEND} wstate_e;

  wstate_e     state;
  logic [7:0]  rx_data;
  logic        rx_valid, rx_err;
  logic [95:0] frame;
  logic [3:0]  nbytes;
  logic [71:0] answer;
  logic        tx_valid, tx_ready;

  logic             core_en;
  logic [XLEN-1:0]  core_result;
  logic             core_done, core_illegal, core_busy;

  xiv_uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(uart_rx), .data(rx_data), .valid(rx_valid), .frame_err(rx_err)
  );

  xiv_uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(answer[7:0]), .valid(tx_valid), .ready(tx_ready), .tx(uart_tx)
  );

  xiv_core #(.LAT_ADD(LAT_ADD), .LAT_MUL(LAT_MUL), .LAT_MISC(LAT_MISC)) u_core (
    .clk, .rst_n,
    .enable(core_en),
    .instr('{data: frame[95:32], word: frame[31:0]}),
    .result(core_result),
    .done(core_done),
    .illegal(core_illegal),
    .busy(core_busy)
  );

  assign tx_valid = (state == W_SEND) && (nbytes != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= W_RECV;
      frame   <= '0;
      nbytes  <= '0;
      answer  <= '0;
      core_en <= 1'b0;
    end else begin
      core_en <= 1'b0;
      case (state)
        W_RECV: if (rx_err) begin
          nbytes <= '0;                      // line error: restart the frame
        end else if (rx_valid) begin
          frame <= {rx_data, frame[95:8]};
          if (nbytes == 4'd11) begin
            nbytes  <= '0;
            core_en <= 1'b1;
            state   <= W_EXEC;
          end else nbytes <= nbytes + 4'd1;
        end
        W_EXEC: if (core_done) begin
          answer <= {7'd0, core_illegal, core_result};
          nbytes <= 4'd9;
          state  <= W_SEND;
        end
        W_SEND: begin
          if (tx_valid && tx_ready) begin
            answer <= {8'd0, answer[71:8]};
            nbytes <= nbytes - 4'd1;
          end else if (nbytes == '0 && tx_ready) begin
            state <= W_RECV;
          end
        end
        default: state <= W_RECV;
      endcase
    end
  end

endmodule
