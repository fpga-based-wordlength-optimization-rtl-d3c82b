// input_data_generator: stimulus source for the emulated DSP design.
//
// Produces one DATA_W-bit signed sample per cycle while `en` is high: the
// top DATA_W bits of a 32-bit xorshift generator, i.e. white noise uniformly
// spread over the full signed range. `load` restarts the sequence, so every
// wordlength configuration under test is fed exactly the same data.
// Timing: `sample`/`valid` are registered; a sample appears one cycle after
// the `en` that produced it. The framework names this block only; white
// uniform noise as stimulus is this design's choice.
module input_data_generator #(
  parameter int unsigned DATA_W = 16,
  parameter logic [31:0] SEED   = 32'h1F2E_3D4C
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic                     en,
  output logic signed [DATA_W-1:0] sample,
  output logic                     valid
);
  logic [31:0] rnd;

  xorshift_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .load, .en, .rnd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= en && !load;
      if (en && !load) sample <= rnd[31 -: DATA_W];
    end
  end

  initial assert (DATA_W <= 32) else $error("DATA_W above 32 is not supported");
endmodule
