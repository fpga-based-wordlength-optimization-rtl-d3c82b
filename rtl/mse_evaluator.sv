// mse_evaluator: accuracy evaluator measuring mean square error.
//
// Compares each output sample of the wordlength-reduced DSP design (`dut`)
// with the same sample from a full-wordlength reference copy (`ref_s`) and
// accumulates the squared difference. After `num_samples` samples it stops
// counting and raises `done` (held until the next `clear`). The result is
// the sum of squared errors `sse` (saturating at all ones) in units of the
// output LSB squared; the host divides it by num_samples and the LSB weight
// to get the MSE, so no divider is needed in hardware. The framework gives
// the metric (MSE) and the block's role; using an on-chip reference copy and
// returning the error sum instead of the quotient are this design's choices.
// Timing: one sample pair per cycle when `in_valid`; `done` rises in the
// cycle after the last counted sample.
module mse_evaluator #(
  parameter int unsigned W     = 20,
  parameter int unsigned SSE_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] dut,
  input  logic signed [W-1:0] ref_s,
  input  logic [31:0]         num_samples,
  output logic [SSE_W-1:0]    sse,
  output logic [31:0]         count,
  output logic                done
);
  logic signed [W:0]     err;
  logic        [2*W+1:0] sq;
  logic        [SSE_W:0] sum;

  always_comb begin
    err = (W+1)'(ref_s) - (W+1)'(dut);
    sq  = (2*W+2)'(err * err);
    sum = (SSE_W+1)'(sse) + (SSE_W+1)'(sq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sse   <= '0;
      count <= '0;
      done  <= 1'b0;
    end else if (clear) begin
      sse   <= '0;
      count <= '0;
      done  <= 1'b0;
    end else if (count >= num_samples) begin
      done <= 1'b1;
    end else if (in_valid) begin
      sse   <= sum[SSE_W] ? '1 : sum[SSE_W-1:0];
      count <= count + 1'b1;
      if (count + 1 == num_samples) done <= 1'b1;
    end
  end

  initial assert (2 * W + 2 <= SSE_W) else $error("mse_evaluator: SSE_W too narrow");
endmodule
