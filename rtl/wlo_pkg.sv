// wlo_pkg: types, constants and small arithmetic helpers shared by the
// wordlength-optimization emulation blocks.
//
// The command bytes define the link protocol between the host computer and
// the control unit (this design's own choice; only the direction of the
// traffic, configurations in and accuracy results out, comes from the
// framework description). Helpers:
//   sat_shift  - arithmetic right shift followed by saturation to a narrower
//                signed width, the quantiser used between DSP stages.
//   popcount4  - number of set bits in a nibble (bit error counting).
package wlo_pkg;

  // Host -> FPGA command codes.
  typedef enum logic [7:0] {
    CMD_WRITE = 8'h01,  // followed by address byte and data byte
    CMD_START = 8'h02,  // run one evaluation, result bytes are returned
    CMD_READ  = 8'h03   // followed by address byte; the stored byte is returned
  } cmd_e;

  // Reply to CMD_WRITE, so the host knows the write has landed.
  localparam logic [7:0] ACK_BYTE = 8'hA5;

  // Saturating quantiser: shift right by SH (arithmetic) and clip to OW bits.
  // Input at most 64 bits wide.
  function automatic logic signed [63:0] sat_shift(input logic signed [63:0] v,
                                                   input int sh, input int ow);
    logic signed [63:0] s, hi, lo;
    s  = v >>> sh;
    hi = (64'sd1 <<< (ow - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (ow - 1));
    if (s > hi) return hi;
    if (s < lo) return lo;
    return s;
  endfunction

  function automatic logic [2:0] popcount4(input logic [3:0] v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

endpackage
