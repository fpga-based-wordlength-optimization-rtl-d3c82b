// tb_vv_dsp: noise-free 16-QAM symbols rotated by a known carrier phase
// (a constant 10 degrees, then a ramp that runs past 45 and up to 100
// degrees). Checks: the latency of LAT = WIN/2 + 6 input steps and that
// outputs come back in input order; that after the window has filled every
// output lies within A/4 of the transmitted point (full phase wordlength); that the unwrapped phase
// estimate tracks the true phase within 1 degree, also beyond +-45 degrees;
// and that a 3-bit phase wordlength makes the estimate visibly coarser.
module tb_vv_dsp;
  localparam int A = 256, WIN = 32, LAT = WIN / 2 + 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [11:0] ii = 0, iq = 0, oi, oq;
  logic [7:0] wl_phase = 8'd10;
  logic out_valid;
  logic signed [15:0] phase_est;
  real PI = 3.14159265358979;

  vv_dsp #(.SYM_W(12), .WIN(WIN)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_i(ii), .in_q(iq),
    .wl_mag(8'd8), .wl_part(8'd8), .wl_pow2(8'd12), .wl_pow4(8'd12), .wl_phase,
    .out_i(oi), .out_q(oq), .out_valid, .phase_est);

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic int lvl(logic b1, logic b0);
    int m = b0 ? A : 3 * A;
    return b1 ? m : -m;
  endfunction

  int    sent_i [$], sent_q [$];
  real   sent_ph [$];
  int    steps, first_out, nout, coarse_steps;
  real   max_ph_err, max_seen_ph;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare outputs, in order
  always @(negedge clk) if (rst_n && out_valid) begin
    int xi, xq;
    real ph, est, d;
    xi = sent_i.pop_front(); xq = sent_q.pop_front(); ph = sent_ph.pop_front();
    if (first_out < 0) first_out = steps;
    nout++;
    if (nout > WIN && wl_phase == 8'd10) begin
      checks++;
      if (fabs(real'(oi - xi)) > A / 4 || fabs(real'(oq - xq)) > A / 4) begin
        failures++;
        if (failures < 8) $display("FAIL out %0d (%0d,%0d) exp (%0d,%0d) phi %0d", nout, oi, oq, xi, xq, phase_est);
      end
    end
  end

  task automatic run(int n, real ph0, real ph1, logic [7:0] wlp);
    logic [3:0] b;
    real ph, a, ci, cq, est, d;
    wl_phase = wlp;
    clear = 1; @(negedge clk); clear = 0;
    sent_i.delete(); sent_q.delete(); sent_ph.delete();
    steps = 0; first_out = -1; nout = 0; max_ph_err = 0; max_seen_ph = 0;
    for (int k = 0; k < n; k++) begin
      b = 4'($urandom);
      ph = ph0 + (ph1 - ph0) * k / n;          // degrees
      a = ph / 180.0 * PI;
      ci = real'(lvl(b[3], b[2])); cq = real'(lvl(b[1], b[0]));
      ii = 12'($rtoi(ci * $cos(a) - cq * $sin(a) + 1000.5) - 1000);
      iq = 12'($rtoi(ci * $sin(a) + cq * $cos(a) + 1000.5) - 1000);
      sent_i.push_back(lvl(b[3], b[2])); sent_q.push_back(lvl(b[1], b[0]));
      sent_ph.push_back(ph);
      in_valid = 1;
      @(negedge clk);
      steps++;
      in_valid = 0;
      if (k % 5 == 0) @(negedge clk);          // stalls
      if (k > 2 * WIN) begin
        // estimate covers the window centred LAT-5 steps back
        est = real'(phase_est) / 65536.0 * 360.0;
        d = est - (ph0 + (ph1 - ph0) * (k - WIN / 2) / n);
        if (fabs(d) > max_ph_err) max_ph_err = fabs(d);
        if (est > max_seen_ph) max_seen_ph = est;
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // constant phase
    run(600, 10.0, 10.0, 8'd10);
    checks++;
    if (first_out != LAT + 1) begin failures++; $display("FAIL latency: first output after %0d inputs", first_out); end
    checks++;
    if (nout != 600 - LAT) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (max_ph_err > 1.0) begin failures++; $display("FAIL constant phase error %f deg", max_ph_err); end
    // ramp through +45 degrees: needs unwrapping
    run(3000, 0.0, 100.0, 8'd10);
    checks++;
    if (max_ph_err > 1.0 || max_seen_ph < 90.0) begin
      failures++; $display("FAIL ramp: error %f deg, reached %f deg", max_ph_err, max_seen_ph);
    end
    // coarse phase wordlength: 3 bits over +-45 degrees = 11.25 degree steps
    run(600, 10.0, 10.0, 8'd3);
    checks++;
    if (max_ph_err < 0.5 || max_ph_err > 12.0) begin failures++; $display("FAIL coarse phase error %f deg", max_ph_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
