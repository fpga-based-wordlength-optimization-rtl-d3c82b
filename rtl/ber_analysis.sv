// ber_analysis: bit error counter of the phase recovery emulation.
//
// The transmitted bits of every symbol are pushed into a FIFO (`tx_valid`,
// `tx_bits`) as they leave the transmitter; every demodulated symbol
// (`rx_valid`, `rx_bits`) pops the oldest entry, so transmitted and received
// bits are paired by order, whatever the latency between them (up to DEPTH
// symbols). Differing bits are counted. After `num_symbols` received symbols
// `done` rises and holds; `bit_errors` and `bits_total` (4 per symbol) give
// the bit error rate bit_errors/bits_total, formed by the host. `clear`
// empties the FIFO and the counters. The framework gives the metric (BER)
// and the place of this unit; the FIFO pairing is this design's choice.
// Timing: one symbol per cycle on each side; `done` rises the cycle after
// the last counted symbol.
module ber_analysis
  import wlo_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        tx_valid,
  input  logic [3:0]  tx_bits,
  input  logic        rx_valid,
  input  logic [3:0]  rx_bits,
  input  logic [31:0] num_symbols,
  output logic [31:0] bit_errors,
  output logic [31:0] bits_total,
  output logic        done,
  output logic        overflow      // FIFO overrun or underrun before done (sticky)
);
  localparam int AW = $clog2(DEPTH);

  logic [3:0]    fifo [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   level;
  logic [31:0]   nsym;
  logic          pop;

  assign pop = rx_valid && !done;

  always_ff @(posedge clk) begin
    if (tx_valid) fifo[wptr] <= tx_bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; level <= '0;
      nsym <= '0; bit_errors <= '0; bits_total <= '0;
      done <= 1'b0; overflow <= 1'b0;
    end else if (clear) begin
      wptr <= '0; rptr <= '0; level <= '0;
      nsym <= '0; bit_errors <= '0; bits_total <= '0;
      done <= 1'b0; overflow <= 1'b0;
    end else begin
      if (tx_valid) wptr <= wptr + 1'b1;
      if (pop)      rptr <= rptr + 1'b1;
      level <= level + (AW+1)'(tx_valid) - (AW+1)'(pop);
      if (!done && ((tx_valid && !pop && 32'(level) == DEPTH) || (pop && level == 0))) overflow <= 1'b1;
      if (nsym >= num_symbols) done <= 1'b1;
      else if (pop) begin
        nsym       <= nsym + 1'b1;
        bit_errors <= bit_errors + 32'(popcount4(fifo[rptr] ^ rx_bits));
        bits_total <= bits_total + 32'd4;
        if (nsym + 1 == num_symbols) done <= 1'b1;
      end
    end
  end

  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("ber_analysis: DEPTH must be a power of two");
endmodule
