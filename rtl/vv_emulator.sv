// vv_emulator: FPGA emulation system for wordlength optimization of the
// Viterbi-Viterbi phase recovery (VV DSP).
//
// A transmitter (random bits, 16-QAM modulator) feeds a synthetic channel
// (random-walk phase noise, additive Gaussian-like noise); the receiver
// runs the VV DSP with the wordlengths under test, demodulates, and the
// analysis unit counts bit errors against the transmitted bits. The host
// writes parameters into the RAM of the control unit over the serial link,
// starts a run and reads back the error count.
//
// Parameter memory map (bytes, command 01 aa dd; all reset to FF):
//   0..3  number of symbols per run, most significant byte first
//         (4 bits per symbol: 1.5 million bits = 375000 symbols)
//   4     magnitude wordlength        (2..8)
//   5     partitioned output wordlength (2..8)
//   6     2nd-power wordlength        (2..12)
//   7     4th-power wordlength        (2..12)
//   8     phase wordlength            (2..10)
//   9     channel noise scale sigma   (noise std ~ 1.155*sigma LSB)
//   10    channel phase-noise step    (2^-16 turn per symbol)
// Result of command 02: 8 bytes, bit errors (32 bits) then bits counted
// (32 bits), most significant byte first.
// Timing: one symbol per cycle; a run of N symbols takes N + LAT + a few
// cycles, LAT being the VV DSP latency. The bit-pairing FIFO of the
// analysis holds max(64, 2*WIN) symbols, more than are ever in flight.
// The chain transmitter -> channel -> VV DSP -> demodulator -> analysis and
// the parameter/result RAM behind a communication interface follow the
// framework; the formats, the map and the link are this design's choices.
module vv_emulator #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned SYM_W        = 12,
  parameter int          AMP          = 256,
  parameter int unsigned WIN          = 64,
  localparam int unsigned NUM_PARAMS  = 11,
  // the pairing FIFO must hold every symbol in flight through the receiver
  localparam int unsigned BER_DEPTH   = (2 * WIN > 64) ? 2 * WIN : 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic        busy,
  output logic [31:0] bit_errors,
  output logic [31:0] bits_total,
  output logic        fifo_error,     // transmit/receive pairing was lost
  output logic signed [15:0] phase_est
);
  typedef enum logic [1:0] {R_IDLE, R_CLEAR, R_RUN, R_DONE} run_e;

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] params [NUM_PARAMS];
  logic       start, done, ber_done, clear, tx_en;
  run_e       rstate;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd(uart_txd));

  control_unit #(.NUM_PARAMS(NUM_PARAMS), .RES_BYTES(8)) u_ctrl (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .params, .start, .busy, .done, .result({bit_errors, bits_total}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rstate <= R_IDLE;
    else unique case (rstate)
      R_IDLE:  if (start) rstate <= R_CLEAR;
      R_CLEAR: rstate <= R_RUN;
      R_RUN:   if (ber_done) rstate <= R_DONE;
      R_DONE:  if (start) rstate <= R_CLEAR;
      default: rstate <= R_IDLE;
    endcase
  end

  assign clear = (rstate == R_CLEAR);
  assign tx_en = (rstate == R_RUN) && !ber_done;
  assign done  = (rstate == R_DONE);

  // ---- transmitter and channel --------------------------------------------
  logic [3:0]              t_bits;
  logic signed [SYM_W-1:0] t_i, t_q, c_i, c_q, r_i, r_q;
  logic                    t_valid, c_valid, r_valid, d_valid;
  logic [3:0]              d_bits;

  transmitter #(.SYM_W(SYM_W), .AMP(AMP)) u_txm (
    .clk, .rst_n, .load(clear), .en(tx_en),
    .bits(t_bits), .sym_i(t_i), .sym_q(t_q), .valid(t_valid));

  channel #(.SYM_W(SYM_W)) u_chan (
    .clk, .rst_n, .load(clear), .in_valid(t_valid), .in_i(t_i), .in_q(t_q),
    .sigma(params[9]), .pn_step(params[10]),
    .out_i(c_i), .out_q(c_q), .out_valid(c_valid));

  // ---- receiver ------------------------------------------------------------
  vv_dsp #(.SYM_W(SYM_W), .WIN(WIN)) u_vv (
    .clk, .rst_n, .clear, .in_valid(c_valid), .in_i(c_i), .in_q(c_q),
    .wl_mag(params[4]), .wl_part(params[5]), .wl_pow2(params[6]),
    .wl_pow4(params[7]), .wl_phase(params[8]),
    .out_i(r_i), .out_q(r_q), .out_valid(r_valid), .phase_est);

  qam16_demodulator #(.SYM_W(SYM_W), .AMP(AMP)) u_demod (
    .clk, .rst_n, .in_valid(r_valid), .in_i(r_i), .in_q(r_q),
    .bits(d_bits), .out_valid(d_valid));

  ber_analysis #(.DEPTH(BER_DEPTH)) u_ber (
    .clk, .rst_n, .clear, .tx_valid(t_valid), .tx_bits(t_bits),
    .rx_valid(d_valid), .rx_bits(d_bits),
    .num_symbols({params[0], params[1], params[2], params[3]}),
    .bit_errors, .bits_total, .done(ber_done), .overflow(fifo_error));
endmodule
