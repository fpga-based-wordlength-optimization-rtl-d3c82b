// uart_tx: transmit half of the serial link to the host computer.
//
// Sends a byte as 8N1 serial (start bit low, eight data bits LSB first,
// stop bit high), each bit CLKS_PER_BIT cycles long. A byte is accepted with
// a valid/ready handshake: `ready` is high while idle, and the byte on
// `data` is taken in the cycle where `valid && ready`. `txd` idles high.
// UART framing and baud rate are this design's choices; the framework only
// names a communication interface back to the PC.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        txd       <= 1'b0;          // start bit goes out at once
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        bits_left <= bits_left - 1'b1;
        frame     <= {1'b1, frame[9:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : frame[1];
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
