// fir_transposed: transposed-form FIR filter with wordlength-controlled
// tap multiplier outputs.
//
// TAPS coefficients (15 for the 14th-order filter; 30 for the 29th-order one
// with PROD_W = 24). Each input sample x is multiplied by every coefficient
// h[k] at once; the products enter a chain of adders and registers running
// from the last tap towards the output (transposed structure), so
//   y[n] = sum_k h[k] * x[n-k].
// Each product (Q1.(DATA_W-1) x Q1.(COEF_W-1)) is reduced to a PROD_W-bit
// signal, Q1.(PROD_W-1), by truncation and saturation, and then passes a
// bit_switch controlled by wl_tap[k], which keeps its wl_tap[k] most
// significant bits. These tap multiplier outputs are the signals whose
// wordlengths are optimized. The accumulation is ACC_W = PROD_W+clog2(TAPS)
// bits wide, so no sum overflows.
// Coefficients are not given by the framework; by default they form a
// symmetric triangular low-pass, h[k] proportional to min(k+1, TAPS-k) and
// scaled to a DC gain just below 1. The structure, tap count and product
// wordlength range follow the framework; the coefficient set, the data and
// coefficient widths and the truncating quantiser are this design's choices.
// Timing: one sample per cycle when `in_valid`; `y` is registered and valid
// one cycle after its input (`out_valid`). `clear` empties the delay line.
module fir_transposed
  import wlo_pkg::*;
#(
  parameter int unsigned TAPS   = 15,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned PROD_W = 16,
  parameter int unsigned WL_W   = 8,
  localparam int unsigned ACC_W = PROD_W + $clog2(TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic [WL_W-1:0]          wl_tap [TAPS],
  output logic signed [ACC_W-1:0]  y,
  output logic                     out_valid
);
  // Triangular low-pass coefficient k, Q1.(COEF_W-1).
  function automatic int coef_of(int k);
    int s, v;
    s = 0;
    for (int i = 0; i < TAPS; i++) s += ((i + 1) < (TAPS - i)) ? (i + 1) : (TAPS - i);
    v = ((k + 1) < (TAPS - k)) ? (k + 1) : (TAPS - k);
    return int'((longint'(v) * ((longint'(1) << (COEF_W - 1)) - 1)) / longint'(s));
  endfunction

  localparam int unsigned FULL_W = DATA_W + COEF_W;

  logic signed [PROD_W-1:0] prod_q  [TAPS];   // quantised tap products
  logic        [PROD_W-1:0] prod_bs [TAPS];   // after the bit switches
  logic signed [ACC_W-1:0]  r       [TAPS];   // r[0] unused, r[k] is the register after tap k

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam logic signed [COEF_W-1:0] H = COEF_W'(coef_of(k));
    logic signed [FULL_W-1:0] p;
    assign p         = x * H;
    assign prod_q[k] = PROD_W'(sat_shift(64'(p), FULL_W - 1 - PROD_W, PROD_W));
    bit_switch #(.W(PROD_W), .WL_W(WL_W)) u_bs (
      .din(prod_q[k]), .wl(wl_tap[k]), .dout(prod_bs[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) r[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      for (int k = 0; k < TAPS; k++) r[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 1; k < TAPS - 1; k++)
          r[k] <= ACC_W'(signed'(prod_bs[k])) + r[k+1];
        r[TAPS-1] <= ACC_W'(signed'(prod_bs[TAPS-1]));
        y <= ACC_W'(signed'(prod_bs[0])) + r[1];
        r[0] <= '0;
      end
    end
  end

  initial assert (TAPS >= 2 && FULL_W - 1 >= PROD_W && FULL_W <= 64)
    else $error("fir_transposed: unsupported sizes");
endmodule
