// xorshift_rng: 32-bit xorshift pseudo-random number generator.
//
// Produces a new 32-bit word every cycle that `en` is high, using the
// shift/XOR recurrence x ^= x<<13; x ^= x>>17; x ^= x<<5 (period 2^32-1).
// `load` restarts the sequence from SEED so that every evaluation run sees
// the same stimulus, which keeps wordlength configurations comparable. The
// generator type is this design's choice; the framework only calls for a
// random number generator. `rnd` is the current state (registered output).
module xorshift_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        en,
  output logic [31:0] rnd
);
  function automatic logic [31:0] step(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rnd <= SEED;
    else if (load) rnd <= SEED;
    else if (en)   rnd <= step(rnd);
  end

  initial assert (SEED != 32'd0) else $error("xorshift seed must be non-zero");
endmodule
