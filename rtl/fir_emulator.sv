// fir_emulator: FPGA emulation system for wordlength optimization of a
// transposed FIR filter.
//
// The host computer writes a wordlength configuration and starts a run; the
// system streams the same pseudo-random input through the filter under test
// and through a full-wordlength reference copy, and returns the sum of
// squared output errors (from which the host forms the MSE). BATCH copies
// of the filter, each with its own configuration, run side by side on the
// same input (batch evaluation); BATCH = 1 is the single-configuration case.
//
// Data path per run: input_data_generator -> input bit_switch ->
// fir_transposed (bit switch on every tap multiplier output) -> output
// bit_switch -> mse_evaluator, with fir_transposed at full wordlength as the
// reference. Control path: uart_rx/uart_tx -> control_unit (param_ram).
//
// Parameter memory map (bytes, written with command 01 aa dd):
//   0..3                    number of samples per run, most significant first
//   4 + b*(TAPS+2)          batch lane b: input wordlength   (0..DATA_W)
//   4 + b*(TAPS+2) + 1 + k  batch lane b: tap k product wordlength (0..PROD_W)
//   4 + b*(TAPS+2) + TAPS+1 batch lane b: output wordlength  (0..ACC_W)
// All bytes reset to FF (full wordlength; run length 2^32-1).
// Result of command 02: BATCH words of 64 bits, lane BATCH-1 first, each
// the saturating sum of squared errors in output-LSB^2 units.
// Timing: a run starts 2 cycles after the start command is decoded, takes
// one cycle per sample plus a few cycles of pipeline, and `done` then holds
// until the next start.
// The block structure (control unit, input generator, bit switches, DSP
// design, accuracy evaluator, batch lanes) follows the framework; the
// reference copy, memory map and serial link are this design's choices.
module fir_emulator #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned TAPS         = 15,
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned COEF_W       = 16,
  parameter int unsigned PROD_W       = 16,
  parameter int unsigned BATCH        = 1,
  localparam int unsigned ACC_W       = PROD_W + $clog2(TAPS),
  localparam int unsigned LANE_P      = TAPS + 2,
  localparam int unsigned NUM_PARAMS  = 4 + BATCH * LANE_P,
  localparam int unsigned SSE_W       = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic busy,                 // an evaluation is running
  output logic [BATCH*SSE_W-1:0] sse // last results, also sent to the host
);
  typedef enum logic [1:0] {R_IDLE, R_CLEAR, R_RUN, R_DONE} run_e;

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] params [NUM_PARAMS];
  logic       start, done;
  run_e       rstate;
  logic       clear, gen_en;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .txd(uart_txd));

  control_unit #(.NUM_PARAMS(NUM_PARAMS), .RES_BYTES(BATCH * SSE_W / 8)) u_ctrl (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .params, .start, .busy, .done, .result(sse));

  // ---- run sequencing ----------------------------------------------------
  logic [31:0] num_samples;
  assign num_samples = {params[0], params[1], params[2], params[3]};

  logic [BATCH-1:0] lane_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rstate <= R_IDLE;
    else unique case (rstate)
      R_IDLE:  if (start) rstate <= R_CLEAR;
      R_CLEAR: rstate <= R_RUN;
      R_RUN:   if (&lane_done) rstate <= R_DONE;
      R_DONE:  if (start) rstate <= R_CLEAR;
      default: rstate <= R_IDLE;
    endcase
  end

  assign clear  = (rstate == R_CLEAR);
  assign gen_en = (rstate == R_RUN) && !(&lane_done);
  assign done   = (rstate == R_DONE);

  // ---- shared stimulus and reference ------------------------------------
  logic signed [DATA_W-1:0] x;
  logic                     x_valid;
  logic signed [ACC_W-1:0]  y_ref;
  logic                     y_ref_valid;
  logic [7:0]               wl_full [TAPS];

  always_comb for (int k = 0; k < TAPS; k++) wl_full[k] = 8'hFF;

  input_data_generator #(.DATA_W(DATA_W)) u_gen (
    .clk, .rst_n, .load(clear), .en(gen_en), .sample(x), .valid(x_valid));

  fir_transposed #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .PROD_W(PROD_W)) u_ref (
    .clk, .rst_n, .clear, .in_valid(x_valid), .x, .wl_tap(wl_full),
    .y(y_ref), .out_valid(y_ref_valid));

  // ---- batch lanes: configuration under test -----------------------------
  for (genvar b = 0; b < BATCH; b++) begin : g_lane
    localparam int unsigned BASE = 4 + b * LANE_P;
    logic [DATA_W-1:0]       x_bs;
    logic [7:0]              wl_tap [TAPS];
    logic signed [ACC_W-1:0] y;
    logic [ACC_W-1:0]        y_bs;
    logic                    y_valid;
    logic [31:0]             count;

    always_comb for (int k = 0; k < TAPS; k++) wl_tap[k] = params[BASE + 1 + k];

    bit_switch #(.W(DATA_W)) u_bs_in (.din(x), .wl(params[BASE]), .dout(x_bs));

    fir_transposed #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .PROD_W(PROD_W)) u_fir (
      .clk, .rst_n, .clear, .in_valid(x_valid), .x(signed'(x_bs)), .wl_tap,
      .y, .out_valid(y_valid));

    bit_switch #(.W(ACC_W)) u_bs_out (.din(y), .wl(params[BASE + TAPS + 1]), .dout(y_bs));

    mse_evaluator #(.W(ACC_W), .SSE_W(SSE_W)) u_eval (
      .clk, .rst_n, .clear, .in_valid(y_valid), .dut(signed'(y_bs)), .ref_s(y_ref),
      .num_samples, .sse(sse[b*SSE_W +: SSE_W]), .count, .done(lane_done[b]));

    // The lane and the reference see the same input stream.
    assert property (@(posedge clk) disable iff (!rst_n) y_valid == y_ref_valid);
  end
endmodule
