// vv_dsp: Viterbi-Viterbi carrier phase recovery for 16-QAM with QPSK
// partitioning, with a bit switch on each of its five internal signals.
//
// Received symbols r carry an unknown, slowly wandering carrier phase. The
// symbols of the inner and outer 16-QAM rings lie on the diagonals, like
// QPSK, so their fourth power removes the modulation and leaves four times
// the carrier phase. The pipeline, advancing one step per `in_valid`:
//   1. magnitude    m  = (I^2+Q^2) >> MAG_SH, MAG_W-bit unsigned,   BS wl_mag
//   2. partitioning p  = r >> PART_SH if m < THR_LO (inner ring) or
//                        m >= THR_HI (outer ring), else 0, PART_W bits, BS wl_part
//   3. 2nd power    p^2 >> POW2_SH, saturated to POW_W bits,        BS wl_pow2
//   4. 4th power    (p^2)^2 >> POW4_SH, saturated to POW_W bits,    BS wl_pow4
//   5. sliding sum  S of the last WIN 4th powers
//   6. phase        theta = (atan2(S) + pi) / 4, a value in [-pi/4, pi/4),
//                   kept as PH_W bits (units of 2^-12 turn),           BS wl_phase
//   7. unwrapping   phi moves by theta - phi reduced modulo pi/2, so the
//                   estimate follows the phase beyond +-pi/4 without
//                   jumps; phi is held while S is zero
//   8. derotation   out = r(delayed by WIN/2 + 5 steps) rotated by -phi.
// The delay aligns every symbol with the window centred on it.
// Timing: out_valid accompanies an input step once LAT = WIN/2 + 6 symbols
// have entered, and then carries the symbol that entered LAT steps before.
// Bit switches keep the wl most significant bits of each signal. The five
// optimized signals and their wordlength ranges (magnitude and partitioned
// output 2..8 bits, 2nd and 4th power 2..12, phase 2..10) follow the
// framework; the scalings, thresholds, window length and the CORDIC-based
// angle and rotation are this design's choices.
module vv_dsp
  import wlo_pkg::*;
#(
  parameter int unsigned SYM_W   = 12,
  parameter int unsigned WIN     = 64,
  parameter int unsigned MAG_W   = 8,
  parameter int unsigned PART_W  = 8,
  parameter int unsigned POW_W   = 12,
  parameter int unsigned PH_W    = 10,
  parameter int unsigned MAG_SH  = 13,
  parameter int unsigned PART_SH = 4,
  parameter int unsigned POW2_SH = 3,
  parameter int unsigned POW4_SH = 9,
  parameter int unsigned THR_LO  = 48,
  parameter int unsigned THR_HI  = 112,
  localparam int unsigned LAT    = WIN / 2 + 6,
  localparam int unsigned SUM_W  = POW_W + $clog2(WIN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [SYM_W-1:0] in_i,
  input  logic signed [SYM_W-1:0] in_q,
  input  logic [7:0]              wl_mag,
  input  logic [7:0]              wl_part,
  input  logic [7:0]              wl_pow2,
  input  logic [7:0]              wl_pow4,
  input  logic [7:0]              wl_phase,
  output logic signed [SYM_W-1:0] out_i,
  output logic signed [SYM_W-1:0] out_q,
  output logic                    out_valid,
  output logic signed [15:0]      phase_est    // unwrapped estimate phi, 2^-16 turn
);
  // ---- 1+2: magnitude and partitioning (combinational on the input) -----
  logic [MAG_W-1:0]         mag, mag_bs;
  logic                     keep;
  logic [PART_W-1:0]        pi_raw, pq_raw, pi_bs, pq_bs;
  logic signed [PART_W-1:0] p1_i, p1_q;         // stage 1 register

  always_comb begin
    mag    = MAG_W'(unsigned'(sat_shift(64'(in_i) * 64'(in_i) + 64'(in_q) * 64'(in_q),
                                        MAG_SH, MAG_W + 1)));
    pi_raw = PART_W'(sat_shift(64'(in_i), PART_SH, PART_W));
    pq_raw = PART_W'(sat_shift(64'(in_q), PART_SH, PART_W));
  end

  bit_switch #(.W(MAG_W))  u_bs_mag (.din(mag),    .wl(wl_mag),  .dout(mag_bs));
  assign keep = (32'(mag_bs) < THR_LO) || (32'(mag_bs) >= THR_HI);
  bit_switch #(.W(PART_W)) u_bs_pi  (.din(pi_raw), .wl(wl_part), .dout(pi_bs));
  bit_switch #(.W(PART_W)) u_bs_pq  (.din(pq_raw), .wl(wl_part), .dout(pq_bs));

  // ---- 3: second power ---------------------------------------------------
  logic [POW_W-1:0]         s2r_raw, s2i_raw, s2r_bs, s2i_bs;
  logic signed [POW_W-1:0]  p2_r, p2_i;         // stage 2 register
  always_comb begin
    s2r_raw = POW_W'(sat_shift(64'(p1_i) * 64'(p1_i) - 64'(p1_q) * 64'(p1_q), POW2_SH, POW_W));
    s2i_raw = POW_W'(sat_shift(2 * 64'(p1_i) * 64'(p1_q), POW2_SH, POW_W));
  end
  bit_switch #(.W(POW_W)) u_bs_2r (.din(s2r_raw), .wl(wl_pow2), .dout(s2r_bs));
  bit_switch #(.W(POW_W)) u_bs_2i (.din(s2i_raw), .wl(wl_pow2), .dout(s2i_bs));

  // ---- 4: fourth power ---------------------------------------------------
  logic [POW_W-1:0]         s4r_raw, s4i_raw, s4r_bs, s4i_bs;
  logic signed [POW_W-1:0]  p4_r, p4_i;         // stage 3 register
  always_comb begin
    s4r_raw = POW_W'(sat_shift(64'(p2_r) * 64'(p2_r) - 64'(p2_i) * 64'(p2_i), POW4_SH, POW_W));
    s4i_raw = POW_W'(sat_shift(2 * 64'(p2_r) * 64'(p2_i), POW4_SH, POW_W));
  end
  bit_switch #(.W(POW_W)) u_bs_4r (.din(s4r_raw), .wl(wl_pow4), .dout(s4r_bs));
  bit_switch #(.W(POW_W)) u_bs_4i (.din(s4i_raw), .wl(wl_pow4), .dout(s4i_bs));

  // ---- 5: sliding window sum ----------------------------------------------
  logic signed [POW_W-1:0] win_r [WIN];
  logic signed [POW_W-1:0] win_i [WIN];
  logic [$clog2(WIN)-1:0]  wptr;
  logic signed [SUM_W-1:0] sum_r, sum_i;        // stage 4 register

  // ---- 6+7: phase extraction and unwrapping ------------------------------
  logic signed [15:0]     ang;                  // stage 5 (CORDIC register)
  logic                   sum_nz, sum_nz_q;
  logic signed [15:0]     th4, th_full;
  logic [PH_W-1:0]        th_q, th_bs;
  logic signed [15:0]     d;
  logic signed [13:0]     d_red;
  logic signed [15:0]     phi;                  // stage 6 register

  assign sum_nz = (sum_r != 0) || (sum_i != 0);

  cordic #(.W(SUM_W), .ITER(14), .VECTORING(1'b1)) u_atan (
    .clk, .rst_n, .en(in_valid), .x(sum_r), .y(sum_i), .ang('0),
    .xo(), .yo(), .ang_o(ang));

  always_comb begin
    th4     = ang + 16'sd32767 + 16'sd1;        // angle of -S: 4*theta
    th_full = th4 >>> 2;                        // theta in [-8192, 8191]
    th_q    = PH_W'(th_full >>> (16 - 2 - PH_W));
  end
  bit_switch #(.W(PH_W)) u_bs_ph (.din(th_q), .wl(wl_phase), .dout(th_bs));
  always_comb begin
    d     = (16'(signed'(th_bs)) <<< (16 - 2 - PH_W)) - phi;
    d_red = d[13:0];                            // modulo pi/2 into [-pi/4, pi/4)
  end

  // ---- 8: symbol delay line and derotation -------------------------------
  localparam int unsigned DL = WIN / 2 + 6;
  logic signed [SYM_W-1:0] dl_i [DL];
  logic signed [SYM_W-1:0] dl_q [DL];
  logic [$clog2(LAT+1)-1:0] fill;

  cordic #(.W(SYM_W), .ITER(14), .VECTORING(1'b0)) u_derot (
    .clk, .rst_n, .en(in_valid), .x(dl_i[DL-1]), .y(dl_q[DL-1]), .ang(-phi),
    .xo(out_i), .yo(out_q), .ang_o());

  // Reset and clear: the window, the delay line and the phase estimate
  // all start from zero.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_i <= '0; p1_q <= '0;
      p2_r <= '0; p2_i <= '0;
      p4_r <= '0; p4_i <= '0;
      for (int k = 0; k < WIN; k++) begin
        win_r[k] <= '0;
        win_i[k] <= '0;
      end
      wptr <= '0;
      sum_r <= '0; sum_i <= '0;
      sum_nz_q <= 1'b0;
      phi <= '0;
      for (int k = 0; k < DL; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
      fill <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      p1_i <= '0; p1_q <= '0;
      p2_r <= '0; p2_i <= '0;
      p4_r <= '0; p4_i <= '0;
      for (int k = 0; k < WIN; k++) begin
        win_r[k] <= '0;
        win_i[k] <= '0;
      end
      wptr <= '0;
      sum_r <= '0; sum_i <= '0;
      sum_nz_q <= 1'b0;
      phi <= '0;
      for (int k = 0; k < DL; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
      end
      fill <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (32'(fill) >= LAT);
      if (in_valid) begin
        p1_i <= keep ? signed'(pi_bs) : '0;
        p1_q <= keep ? signed'(pq_bs) : '0;
        p2_r <= signed'(s2r_bs);
        p2_i <= signed'(s2i_bs);
        p4_r <= signed'(s4r_bs);
        p4_i <= signed'(s4i_bs);
        win_r[wptr] <= p4_r;
        win_i[wptr] <= p4_i;
        wptr  <= (32'(wptr) == WIN - 1) ? '0 : wptr + 1'b1;
        sum_r <= sum_r + SUM_W'(p4_r) - SUM_W'(win_r[wptr]);
        sum_i <= sum_i + SUM_W'(p4_i) - SUM_W'(win_i[wptr]);
        sum_nz_q <= sum_nz;
        if (sum_nz_q) phi <= phi + 16'(d_red);
        dl_i[0] <= in_i;
        dl_q[0] <= in_q;
        for (int k = 1; k < DL; k++) begin
          dl_i[k] <= dl_i[k-1];
          dl_q[k] <= dl_q[k-1];
        end
        if (32'(fill) < LAT) fill <= fill + 1'b1;
      end
    end
  end

  assign phase_est = phi;

  initial assert (WIN >= 2 && (WIN & (WIN - 1)) == 0 && PH_W <= 14)
    else $error("vv_dsp: WIN must be a power of two, PH_W at most 14");
endmodule
