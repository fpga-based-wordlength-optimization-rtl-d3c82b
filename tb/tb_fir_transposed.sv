// tb_fir_transposed: random input samples and random tap wordlengths; the
// expected output is computed in the testbench as a direct-form convolution
// y[n] = sum_k q_k(h[k]*x[n-k]), where q_k truncates the product to PROD_W
// bits and keeps its wl[k] most significant bits (wl[k] as it was when
// x[n-k] entered, since the transposed form multiplies on arrival), h[k] being the triangular
// coefficients recomputed from their formula. Also checks the one-cycle
// latency, stalls (in_valid low) and clear.
module tb_fir_transposed;
  localparam int TAPS = 15, DW = 16, CW = 16, PW = 16;
  localparam int AW = PW + $clog2(TAPS);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [DW-1:0] x = 0;
  logic [7:0] wl [TAPS];
  logic signed [AW-1:0] y;
  logic out_valid;
  longint h [TAPS];
  longint hist [TAPS];
  int     hwl [TAPS][TAPS];   // wordlengths in force when each past sample was multiplied

  fir_transposed #(.TAPS(TAPS), .DATA_W(DW), .COEF_W(CW), .PROD_W(PW)) dut (
    .clk, .rst_n, .clear, .in_valid, .x, .wl_tap(wl), .y, .out_valid);

  always #5 clk = ~clk;

  function automatic longint q(longint p, int w);
    longint t;
    t = p >>> (DW + CW - 1 - PW);
    if (t > (64'sd1 <<< (PW - 1)) - 1) t = (64'sd1 <<< (PW - 1)) - 1;
    if (w >= PW) return t;
    if (w == 0) return 0;
    return (t >>> (PW - w)) <<< (PW - w);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    longint e;
    s = 0;
    for (int k = 0; k < TAPS; k++) s += (k + 1 < TAPS - k) ? k + 1 : TAPS - k;
    for (int k = 0; k < TAPS; k++) h[k] = (longint'((k + 1 < TAPS - k) ? k + 1 : TAPS - k) * 32767) / s;
    for (int k = 0; k < TAPS; k++) begin wl[k] = 8'd16; hist[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if (n % 200 == 0) for (int k = 0; k < TAPS; k++) wl[k] = 8'($urandom_range(0, 18));
      if (n == 1500) begin
        clear = 1; @(negedge clk); clear = 0;
        for (int k = 0; k < TAPS; k++) hist[k] = 0;
      end
      in_valid = ($urandom_range(0, 9) != 0);
      x = (n % 500 < 20) ? -16'sd32768 : DW'($urandom);
      if (in_valid) begin
        for (int k = TAPS - 1; k > 0; k--) begin hist[k] = hist[k-1]; hwl[k] = hwl[k-1]; end
        hist[0] = x;
        for (int k = 0; k < TAPS; k++) hwl[0][k] = int'(wl[k]);
      end
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid"); end
      if (in_valid) begin
        e = 0;
        for (int k = 0; k < TAPS; k++) e += q(hist[k] * h[k], hwl[k][k]);
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d", n, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
