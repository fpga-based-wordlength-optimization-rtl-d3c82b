// control_unit: host command decoder of an emulation system.
//
// The host computer configures the emulated DSP design and starts accuracy
// evaluations over a byte stream (from uart_rx, to uart_tx). The unit keeps
// the configuration in a param_ram and serves three commands:
//   01 aa dd  write byte dd to parameter address aa, answered by A5
//   03 aa     read parameter address aa, answered by its byte
//   02        start one evaluation: `start` pulses for one cycle, the unit
//             waits for `done`, captures `result` and sends its RES_BYTES
//             bytes, most significant byte first.
// Unknown command bytes are ignored. While an evaluation runs, `busy` is high
// and incoming bytes are ignored. The framework gives this unit's role
// (receive wordlength configurations, return the accuracy result); the
// command encoding and the parameter memory layout are this design's own.
module control_unit
  import wlo_pkg::*;
#(
  parameter int unsigned NUM_PARAMS = 16,
  parameter int unsigned RES_BYTES  = 8,
  localparam int unsigned AW        = (NUM_PARAMS > 1) ? $clog2(NUM_PARAMS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // byte stream from the host
  input  logic [7:0]             rx_data,
  input  logic                   rx_valid,
  // byte stream to the host
  output logic [7:0]             tx_data,
  output logic                   tx_valid,
  input  logic                   tx_ready,
  // emulation side
  output logic [7:0]             params [NUM_PARAMS],
  output logic                   start,
  output logic                   busy,
  input  logic                   done,
  input  logic [8*RES_BYTES-1:0] result
);
  typedef enum logic [2:0] {S_CMD, S_WADDR, S_WDATA, S_RADDR, S_RDWAIT, S_RUN, S_SEND} state_e;

  state_e                 state;
  logic [7:0]             addr;
  logic [8*RES_BYTES-1:0] res_q;
  logic [$clog2(RES_BYTES+1)-1:0] left;
  logic                   we, re;
  logic [7:0]             rdata;

  param_ram #(.DEPTH(NUM_PARAMS)) u_ram (
    .clk, .rst_n,
    .we, .waddr(AW'(addr)), .wdata(rx_data),
    .re, .raddr(AW'(rx_data)), .rdata,
    .words(params)
  );

  assign we   = (state == S_WDATA) && rx_valid;
  assign re   = (state == S_RADDR) && rx_valid;
  assign busy = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CMD;
      addr     <= '0;
      res_q    <= '0;
      left     <= '0;
      start    <= 1'b0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else begin
      start <= 1'b0;
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      unique case (state)
        S_CMD: if (rx_valid) begin
          if (rx_data == CMD_WRITE)      state <= S_WADDR;
          else if (rx_data == CMD_READ)  state <= S_RADDR;
          else if (rx_data == CMD_START) begin
            state <= S_RUN;
            start <= 1'b1;
          end
        end
        S_WADDR: if (rx_valid) begin
          addr  <= rx_data;
          state <= S_WDATA;
        end
        S_WDATA: if (rx_valid) begin
          tx_data  <= ACK_BYTE;
          tx_valid <= 1'b1;
          state    <= S_CMD;
        end
        S_RADDR: if (rx_valid) state <= S_RDWAIT;
        S_RDWAIT: begin
          tx_data  <= rdata;
          tx_valid <= 1'b1;
          state    <= S_CMD;
        end
        S_RUN: if (done && !start) begin
          res_q <= result;
          left  <= ($bits(left))'(RES_BYTES);
          state <= S_SEND;
        end
        S_SEND: begin
          if (left == 0) state <= S_CMD;
          else if (!tx_valid || tx_ready) begin
            tx_data  <= res_q[8*RES_BYTES-1 -: 8];
            tx_valid <= 1'b1;
            res_q    <= res_q << 8;
            left     <= left - 1'b1;
          end
        end
        default: state <= S_CMD;
      endcase
    end
  end

  // A byte handed to the transmitter stays stable until it is taken.
  property p_tx_stable;
    @(posedge clk) disable iff (!rst_n) tx_valid && !tx_ready |=> tx_valid && $stable(tx_data);
  endproperty
  assert property (p_tx_stable);
endmodule
