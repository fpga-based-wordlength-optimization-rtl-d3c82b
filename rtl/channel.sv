// channel: synthetic optical-link impairments, phase noise then additive
// white Gaussian noise.
//
// Phase noise is a random walk (Wiener process): per symbol the carrier
// phase moves by +pn_step or -pn_step binary-angle units (2^16 units = one
// turn), chosen by a pseudo-random bit, and the symbol is rotated by the
// accumulated phase with a CORDIC. The noise added to each of I and Q is the
// sum of four independent uniform 8-bit random numbers (close to Gaussian,
// zero mean, standard deviation about 147.8), scaled by sigma/128 with
// rounding; the output is
// saturated to SYM_W bits. `load` restarts the random sequences and the
// phase at 0, so every run sees the same channel.
// Timing: two cycles from a valid input to `out_valid` (CORDIC register,
// then the noise adder register); one symbol per cycle.
// The framework gives the two impairments; the random-walk model, the
// sum-of-uniforms noise source and the parameter scaling are this design's.
module channel
  import wlo_pkg::*;
#(
  parameter int unsigned SYM_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic                    in_valid,
  input  logic signed [SYM_W-1:0] in_i,
  input  logic signed [SYM_W-1:0] in_q,
  input  logic [7:0]              sigma,     // AWGN scale, std ~ 1.155*sigma LSB
  input  logic [7:0]              pn_step,   // phase-noise step, 2^-16 turn units
  output logic signed [SYM_W-1:0] out_i,
  output logic signed [SYM_W-1:0] out_q,
  output logic                    out_valid
);
  logic [31:0]        rnd_i, rnd_q, rnd_p;
  logic signed [15:0] phase;
  logic signed [SYM_W-1:0] rot_i, rot_q;
  logic               rot_valid;
  logic signed [10:0] g_i, g_q;            // sums of four signed bytes
  logic signed [19:0] n_i, n_q;

  xorshift_rng #(.SEED(32'h9E37_79B9)) u_rng_i (.clk, .rst_n, .load, .en(in_valid), .rnd(rnd_i));
  xorshift_rng #(.SEED(32'h7F4A_7C15)) u_rng_q (.clk, .rst_n, .load, .en(in_valid), .rnd(rnd_q));
  xorshift_rng #(.SEED(32'h85EB_CA6B)) u_rng_p (.clk, .rst_n, .load, .en(in_valid), .rnd(rnd_p));

  // Random-walk carrier phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase <= '0;
    else if (load)     phase <= '0;
    else if (in_valid) phase <= rnd_p[31] ? phase + 16'(pn_step) : phase - 16'(pn_step);
  end

  cordic #(.W(SYM_W), .ITER(14), .VECTORING(1'b0)) u_rot (
    .clk, .rst_n, .en(in_valid), .x(in_i), .y(in_q), .ang(phase),
    .xo(rot_i), .yo(rot_q), .ang_o());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rot_valid <= 1'b0;
    else if (load) rot_valid <= 1'b0;
    else           rot_valid <= in_valid;
  end

  always_comb begin
    g_i = 11'(signed'(rnd_i[31:24])) + 11'(signed'(rnd_i[23:16]))
        + 11'(signed'(rnd_i[15:8]))  + 11'(signed'(rnd_i[7:0]));
    g_q = 11'(signed'(rnd_q[31:24])) + 11'(signed'(rnd_q[23:16]))
        + 11'(signed'(rnd_q[15:8]))  + 11'(signed'(rnd_q[7:0]));
    // +2 centres the sum (each signed byte averages -1/2), +64 rounds
    n_i = ((20'(g_i) + 20'sd2) * signed'({12'd0, sigma}) + 20'sd64) >>> 7;
    n_q = ((20'(g_q) + 20'sd2) * signed'({12'd0, sigma}) + 20'sd64) >>> 7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i     <= '0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else if (load) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= rot_valid;
      if (rot_valid) begin
        out_i <= SYM_W'(sat_shift(64'(rot_i) + 64'(n_i), 0, SYM_W));
        out_q <= SYM_W'(sat_shift(64'(rot_q) + 64'(n_q), 0, SYM_W));
      end
    end
  end
endmodule
