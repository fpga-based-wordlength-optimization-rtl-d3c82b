// uart_rx: receive half of the serial link to the host computer.
//
// 8N1 asynchronous serial: a low start bit, eight data bits LSB first and a
// high stop bit, each CLKS_PER_BIT clock cycles long (default 868 = 100 MHz
// / 115200 baud). The input is synchronised with two flip-flops, the start
// bit is confirmed at its middle and every data bit is sampled at its
// middle. A received byte appears on `data` with a one-cycle `valid` pulse
// at the middle of the stop bit; a byte whose stop bit is low is dropped and
// reception resumes only after the line has returned high.
// The framework names only a communication interface to the PC; UART as the
// link, its baud rate and framing are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [2:0] {IDLE, START, DATA, STOP, BREAK} state_e;
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [1:0]    sync;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  wire rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          cnt   <= '0;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx ? IDLE : DATA;   // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            if (rx) begin
              state <= IDLE;
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              state <= BREAK;
            end
          end else cnt <= cnt + 1'b1;
        end
        BREAK: if (rx) state <= IDLE;   // wait for the line to return high
        default: state <= IDLE;
      endcase
    end
  end
endmodule
