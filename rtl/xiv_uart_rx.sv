// xiv_uart_rx: 8N1 UART receiver used by the serial wrapper.
//
// The line is synchronised with two flops. A falling edge starts a frame;
// the start bit is confirmed at its middle, the eight data bits (LSB first)
// are sampled at their middles, and a byte is delivered with a one-cycle
// `valid` pulse if the stop bit is high (otherwise it is dropped and
// `frame_err` pulses). CLKS_PER_BIT = clock frequency / baud rate.
module xiv_uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e      state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        S_IDLE: if (!sync[1]) begin
          state <= S_START;
          cnt   <= '0;
        end
        S_START: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= sync[1] ? S_IDLE : S_DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {sync[1], shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 3'd1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

endmodule
