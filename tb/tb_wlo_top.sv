// tb_wlo_top: end-to-end test of both emulation systems running at the same
// time, each driven by its own host serial port (short bit time, two FIR
// batch lanes). Every mechanism of the design is exercised and counted:
//   batch     - two lanes evaluated in one run with different configurations
//   bitswitch - a reduced tap wordlength raising the MSE above 0 (exact
//               value checked against the model)
//   tapoff    - a tap with wordlength 0
//   fullwl    - full wordlength giving an error sum of exactly 0
//   ber       - additive noise producing bit errors
//   unwrap    - phase noise carrying the estimate beyond +-45 degrees
//   phasewl   - a coarse phase wordlength raising the bit errors
// A mechanism that never happened counts as a failure.
module tb_wlo_top;
  import fir_model_pkg::*;
  localparam int CPB = 8, TAPS = 15, NF = 400, NV = 4000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic fir_rxd, fir_txd, fir_busy, vv_rxd, vv_txd, vv_busy, vv_fifo_error;
  logic [127:0] fir_sse;
  logic [31:0] vv_bit_errors, vv_bits_total;
  logic signed [15:0] vv_phase_est;
  int n_batch = 0, n_bitswitch = 0, n_tapoff = 0, n_fullwl = 0, n_ber = 0, n_unwrap = 0, n_phasewl = 0;
  int max_abs_phase = 0;

  wlo_top #(.CLKS_PER_BIT(CPB), .FIR_BATCH(2)) dut (
    .clk, .rst_n, .fir_rxd, .fir_txd, .fir_busy, .fir_sse,
    .vv_rxd, .vv_txd, .vv_busy, .vv_bit_errors, .vv_bits_total, .vv_fifo_error, .vv_phase_est);
  uart_host #(.CPB(CPB)) fhost (.clk, .txd(fir_rxd), .rxd(fir_txd));
  uart_host #(.CPB(CPB)) vhost (.clk, .txd(vv_rxd), .rxd(vv_txd));

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    int a;
    a = (vv_phase_est < 0) ? -int'(vv_phase_est) : int'(vv_phase_est);
    if (a > max_abs_phase) max_abs_phase = a;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fwr(int a, int d);
    logic [7:0] b; bit ok;
    fhost.send_byte(8'h01); fhost.send_byte(8'(a)); fhost.send_byte(8'(d));
    fhost.get_byte(b, ok, 40 * CPB);
    checks++; if (!ok || b !== 8'hA5) begin failures++; $display("FAIL fir ack"); end
  endtask
  task automatic vwr(int a, int d);
    logic [7:0] b; bit ok;
    vhost.send_byte(8'h01); vhost.send_byte(8'(a)); vhost.send_byte(8'(d));
    vhost.get_byte(b, ok, 40 * CPB);
    checks++; if (!ok || b !== 8'hA5) begin failures++; $display("FAIL vv ack"); end
  endtask

  task automatic frun(output longint unsigned r [2]);
    logic [7:0] b; bit ok;
    fhost.send_byte(8'h02);
    for (int l = 1; l >= 0; l--) begin
      r[l] = 0;
      for (int i = 0; i < 8; i++) begin
        fhost.get_byte(b, ok, 20 * NF + 100 * CPB);
        checks++; if (!ok) begin failures++; $display("FAIL fir result missing"); end
        r[l] = (r[l] << 8) | 64'(b);
      end
    end
  endtask
  task automatic vrun(output int errs);
    logic [7:0] b; bit ok;
    logic [63:0] r;
    vhost.send_byte(8'h02);
    for (int i = 0; i < 8; i++) begin
      vhost.get_byte(b, ok, 4 * NV + 200 * CPB);
      checks++; if (!ok) begin failures++; $display("FAIL vv result missing"); end
      r = (r << 8) | 64'(b);
    end
    errs = int'(r[63:32]);
    checks++; if (r[31:0] != 32'(4 * NV) || vv_fifo_error) begin failures++; $display("FAIL vv bit count / pairing"); end
  endtask

  task automatic fir_side();
    int wl0 [] = new[TAPS];
    int wl1 [] = new[TAPS];
    longint unsigned r [2];
    longint e0, e1;
    fwr(0, 0); fwr(1, 0); fwr(2, NF >> 8); fwr(3, NF & 255);
    for (int cfgi = 0; cfgi < 3; cfgi++) begin
      for (int k = 0; k < TAPS; k++) begin
        wl0[k] = (cfgi == 0) ? 16 : $urandom_range(6, 16);
        wl1[k] = $urandom_range(3, 14);
      end
      if (cfgi == 2) wl1[7] = 0;
      fwr(4, 16);  for (int k = 0; k < TAPS; k++) fwr(5 + k, wl0[k]);  fwr(4 + TAPS + 1, 20);
      fwr(4 + TAPS + 2, 16); for (int k = 0; k < TAPS; k++) fwr(4 + TAPS + 3 + k, wl1[k]); fwr(4 + 2 * TAPS + 3, 20);
      frun(r);
      e0 = model_sse(TAPS, 16, NF, 32'h1F2E_3D4C, 16, wl0, 20);
      e1 = model_sse(TAPS, 16, NF, 32'h1F2E_3D4C, 16, wl1, 20);
      checks++; if (r[0] != e0) begin failures++; $display("FAIL lane 0 %0d exp %0d", r[0], e0); end
      checks++; if (r[1] != e1) begin failures++; $display("FAIL lane 1 %0d exp %0d", r[1], e1); end
      if (r[0] != r[1]) n_batch++;
      if (r[1] > 0 && r[1] == e1) n_bitswitch++;
      if (cfgi == 2 && r[1] == e1) n_tapoff++;
      if (cfgi == 0 && r[0] == 0) n_fullwl++;
    end
  endtask

  task automatic vv_side();
    int e_clean, e_noise, e_full, e_coarse;
    vwr(0, 0); vwr(1, 0); vwr(2, NV >> 8); vwr(3, NV & 255);
    vwr(4, 8); vwr(5, 8); vwr(6, 12); vwr(7, 12); vwr(8, 10);
    vwr(9, 0);   vwr(10, 180); vrun(e_clean);      // strong phase walk, no AWGN
    checks++; if (e_clean != 0) begin failures++; $display("FAIL errors with phase noise only: %0d", e_clean); end
    if (max_abs_phase > 8192 && e_clean == 0) n_unwrap++;
    vwr(9, 110); vwr(10, 0);  vrun(e_noise);
    if (e_noise > 0) n_ber++;
    vwr(9, 60); vwr(10, 60); vrun(e_full);
    vwr(8, 3);  vrun(e_coarse);
    if (e_coarse > e_full) n_phasewl++;
    $display("vv errors: phase-walk %0d, noise %0d, full %0d, coarse phase %0d (max |phase| %0d)",
             e_clean, e_noise, e_full, e_coarse, max_abs_phase);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    fork
      fir_side();
      vv_side();
    join
    $display("mechanisms: batch %0d bitswitch %0d tapoff %0d fullwl %0d ber %0d unwrap %0d phasewl %0d",
             n_batch, n_bitswitch, n_tapoff, n_fullwl, n_ber, n_unwrap, n_phasewl);
    checks++; if (n_batch == 0)     begin failures++; $display("FAIL batch never happened"); end
    checks++; if (n_bitswitch == 0) begin failures++; $display("FAIL bitswitch never happened"); end
    checks++; if (n_tapoff == 0)    begin failures++; $display("FAIL tapoff never happened"); end
    checks++; if (n_fullwl == 0)    begin failures++; $display("FAIL fullwl never happened"); end
    checks++; if (n_ber == 0)       begin failures++; $display("FAIL ber never happened"); end
    checks++; if (n_unwrap == 0)    begin failures++; $display("FAIL unwrap never happened"); end
    checks++; if (n_phasewl == 0)   begin failures++; $display("FAIL phasewl never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
