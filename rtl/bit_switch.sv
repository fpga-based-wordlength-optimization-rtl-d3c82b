// bit_switch: wordlength control for one datapath signal.
//
// A W-bit signal passes through with only its `wl` most significant bits
// kept; the unused least significant bits are forced to 0 by AND-ing the
// signal with a mask. This is how the emulated DSP design trades accuracy
// for wordlength without being re-synthesised: the host changes `wl` and the
// same FPGA image behaves like a design built with a shorter word.
//   wl = 0        -> output is 0 (signal removed, as the FIR search allows)
//   wl >= W       -> output equals input (full wordlength)
// Masking from the LSB side (keeping the sign and integer bits) follows the
// framework's aim of tuning the fractional wordlength; treating wl=0 as
// "all bits off" and saturating wl>=W are this design's choices.
// Purely combinational, no latency.
module bit_switch #(
  parameter int unsigned W    = 16,
  parameter int unsigned WL_W = 8
) (
  input  logic [W-1:0]    din,
  input  logic [WL_W-1:0] wl,
  output logic [W-1:0]    dout
);
  logic [W-1:0] mask;

  always_comb begin
    for (int i = 0; i < W; i++)
      mask[i] = (32'(wl) >= W - i);   // bit i kept when it is among the top wl bits
    dout = din & mask;
  end
endmodule
