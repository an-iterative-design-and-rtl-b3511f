// xiv_uart_tx: 8N1 UART transmitter used by the serial wrapper.
//
// A byte offered with `valid` while `ready` is high is sent as a start bit,
// eight data bits LSB first and a stop bit, each CLKS_PER_BIT cycles long.
// `ready` is low from the accepting edge to the end of the stop bit.
module xiv_uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);

  logic [9:0] shreg;   // stop, data[7:0], start
  logic [3:0] nbits;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (nbits == '0) begin
      if (valid) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
      end
    end else if (cnt == ($bits(cnt))'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      shreg <= {1'b1, shreg[9:1]};
      nbits <= nbits - 4'd1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign ready = (nbits == '0);
  assign tx    = (nbits == '0) ? 1'b1 : shreg[0];

endmodule
