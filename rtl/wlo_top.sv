// wlo_top: the two FPGA emulation systems of the wordlength-optimization
// framework, side by side.
//
// fir_emulator evaluates the MSE of a transposed FIR filter (15 taps by
// default) under a host-chosen wordlength configuration; vv_emulator
// evaluates the bit error rate of a Viterbi-Viterbi phase recovery receiver
// under its five wordlengths. Each system has its own serial link to the
// host and runs independently; they share only the clock and reset. In the
// framework they are separate emulation set-ups; placing both in one top is
// this design's choice. See the two modules for their command maps.
module wlo_top #(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned FIR_TAPS     = 15,
  parameter int unsigned FIR_PROD_W   = 16,
  parameter int unsigned FIR_BATCH    = 1,
  parameter int unsigned VV_WIN       = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // FIR emulation
  input  logic        fir_rxd,
  output logic        fir_txd,
  output logic        fir_busy,
  output logic [FIR_BATCH*64-1:0] fir_sse,
  // VV DSP emulation
  input  logic        vv_rxd,
  output logic        vv_txd,
  output logic        vv_busy,
  output logic [31:0] vv_bit_errors,
  output logic [31:0] vv_bits_total,
  output logic        vv_fifo_error,
  output logic signed [15:0] vv_phase_est
);
  fir_emulator #(
    .CLKS_PER_BIT(CLKS_PER_BIT), .TAPS(FIR_TAPS), .PROD_W(FIR_PROD_W), .BATCH(FIR_BATCH)
  ) u_fir (
    .clk, .rst_n, .uart_rxd(fir_rxd), .uart_txd(fir_txd), .busy(fir_busy), .sse(fir_sse));

  vv_emulator #(.CLKS_PER_BIT(CLKS_PER_BIT), .WIN(VV_WIN)) u_vv (
    .clk, .rst_n, .uart_rxd(vv_rxd), .uart_txd(vv_txd), .busy(vv_busy),
    .bit_errors(vv_bit_errors), .bits_total(vv_bits_total),
    .fifo_error(vv_fifo_error), .phase_est(vv_phase_est));
endmodule
