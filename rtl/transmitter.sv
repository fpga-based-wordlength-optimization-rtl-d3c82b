// transmitter: random data source and 16-QAM modulator for the phase
// recovery emulation.
//
// Each cycle with `en` high, four fresh pseudo-random bits {bi1, bi0, bq1,
// bq0} are mapped to one 16-QAM symbol. Per axis the Gray mapping is
//   b1 b0 = 00 -> -3A, 01 -> -A, 11 -> +A, 10 -> +3A
// so b1 is the sign and b0 marks the inner level; A = AMP. `load` restarts
// the bit sequence. Outputs are registered: `bits`, `sym_i`, `sym_q` and
// `valid` appear one cycle after the `en` that produced them.
// The framework gives the transmitter as a random number generator plus a
// modulator; 16-QAM (the format that QPSK partitioning serves), the Gray
// mapping and the amplitude are this design's choices.
module transmitter #(
  parameter int unsigned SYM_W = 12,
  parameter int          AMP   = 256,
  parameter logic [31:0] SEED  = 32'h6C07_8965
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic                    en,
  output logic [3:0]              bits,
  output logic signed [SYM_W-1:0] sym_i,
  output logic signed [SYM_W-1:0] sym_q,
  output logic                    valid
);
  logic [31:0] rnd;

  xorshift_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .load, .en, .rnd);

  function automatic logic signed [SYM_W-1:0] level(input logic b1, input logic b0);
    int m;
    m = b0 ? AMP : 3 * AMP;
    return SYM_W'(b1 ? m : -m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits  <= '0;
      sym_i <= '0;
      sym_q <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en && !load;
      if (en && !load) begin
        bits  <= rnd[31:28];
        sym_i <= level(rnd[31], rnd[30]);
        sym_q <= level(rnd[29], rnd[28]);
      end
    end
  end

  initial assert (3 * AMP < (1 << (SYM_W - 1))) else $error("transmitter: AMP too large");
endmodule
