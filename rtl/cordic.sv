// cordic: CORDIC rotator / angle extractor used by the channel's phase
// noise and by the phase recovery.
//
// Angles are binary angles: a signed ANG_W = 16 bit number where 2^16 is one
// full turn (so 16384 = 90 degrees and the value wraps naturally modulo 2*pi).
//   VECTORING = 0 (rotation):  (xo, yo) = (x, y) rotated by `ang`
//   VECTORING = 1 (vectoring): ang_o = atan2(y, x); xo = |(x, y)|, yo ~ 0
// A quadrant pre-rotation by 180 degrees brings the vector into the range
// where ITER shift-and-add micro-rotations converge; the micro-rotation
// angles atan(2^-i) are held as binary angles, round(atan(2^-i)/(2*pi)*2^16).
// The CORDIC gain (about 1.6468) is removed at the output by multiplying
// with round(2^15/1.6468) = 19899 and rounding, so magnitudes are preserved.
// The iterations are unrolled in one combinational block and registered
// once: outputs are valid one cycle after an input accepted with `en`.
// Internal width is W+2 bits to absorb the gain plus 4 fractional guard
// bits against truncation error. CORDIC itself is this
// design's choice: the framework names phase noise and phase recovery but
// not how rotations are computed.
module cordic #(
  parameter int unsigned W         = 16,
  parameter int unsigned ITER      = 14,
  parameter bit          VECTORING = 1'b0,
  localparam int unsigned ANG_W    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [W-1:0]     x,
  input  logic signed [W-1:0]     y,
  input  logic signed [ANG_W-1:0] ang,
  output logic signed [W-1:0]     xo,
  output logic signed [W-1:0]     yo,
  output logic signed [ANG_W-1:0] ang_o
);
  localparam int GB = 4;              // fractional guard bits
  localparam int IW = W + 2 + GB;
  localparam logic [ANG_W-1:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0};
  localparam logic signed [16:0] INV_GAIN = 17'sd19899;   // 2^15 / 1.6468

  logic signed [IW-1:0]    cx, cy, nx;
  logic signed [ANG_W-1:0] cz;
  logic signed [IW+16:0]   gx, gy;

  always_comb begin
    cx = IW'(x) <<< GB;
    cy = IW'(y) <<< GB;
    cz = ang;
    if (VECTORING) begin
      cz = '0;
      if (cx < 0) begin
        cx = -cx;
        cy = -cy;
        cz = ANG_W'(32768);       // 180 degrees
      end
    end else if (cz > 16'sd16384 || cz < -16'sd16384) begin
      cx = -cx;
      cy = -cy;
      cz = cz + ANG_W'(32768);    // subtract 180 degrees, modulo one turn
    end
    for (int i = 0; i < ITER; i++) begin
      if (VECTORING ? (cy < 0) : (cz >= 0)) begin
        nx = cx - (cy >>> i);
        cy = cy + (cx >>> i);
        cz = cz - signed'(ATAN[i]);
      end else begin
        nx = cx + (cy >>> i);
        cy = cy - (cx >>> i);
        cz = cz + signed'(ATAN[i]);
      end
      cx = nx;
    end
    gx = ((IW+17)'(cx) * INV_GAIN + ((IW+17)'(1) <<< (14 + GB))) >>> (15 + GB);
    gy = ((IW+17)'(cy) * INV_GAIN + ((IW+17)'(1) <<< (14 + GB))) >>> (15 + GB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xo    <= '0;
      yo    <= '0;
      ang_o <= '0;
    end else if (en) begin
      xo    <= W'(gx);
      yo    <= W'(gy);
      ang_o <= cz;
    end
  end

  initial assert (ITER >= 1 && ITER <= 16) else $error("cordic: ITER must be 1..16");
endmodule
