// qam16_demodulator: hard-decision 16-QAM demodulator.
//
// Decides each axis of the phase-corrected symbol against the thresholds
// 0 and +-2A (A = AMP, the transmitter's amplitude unit) and returns the
// four Gray-coded bits {bi1, bi0, bq1, bq0}: b1 = 1 for a positive value,
// b0 = 1 for an inner level (|v| < 2A). This inverts the transmitter's
// mapping. Timing: registered, one cycle from `in_valid` to `out_valid`.
// The framework names the demodulator; the mapping is this design's choice
// and must match the transmitter.
module qam16_demodulator #(
  parameter int unsigned SYM_W = 12,
  parameter int          AMP   = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SYM_W-1:0] in_i,
  input  logic signed [SYM_W-1:0] in_q,
  output logic [3:0]              bits,
  output logic                    out_valid
);
  function automatic logic [1:0] decide(input logic signed [SYM_W-1:0] v);
    logic pos, inner;
    pos   = (v > 0);
    inner = (v < SYM_W'(2 * AMP)) && (v > -SYM_W'(2 * AMP));
    return {pos, inner};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= {decide(in_i), decide(in_q)};
    end
  end
endmodule
