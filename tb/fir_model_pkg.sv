// fir_model_pkg: bit-accurate testbench model of one FIR emulation run.
// It regenerates the xorshift32 input stream (top DATA_W bits), applies the
// input, per-tap product and output wordlengths (keep the wl most
// significant bits), runs the direct-form convolution with the triangular
// coefficients h[k] = floor(min(k+1, TAPS-k) * (2^15-1) / sum), and returns
// the sum over n samples of (reference - reduced)^2, the reference being
// the same filter at full wordlength.
package fir_model_pkg;
  localparam int DW = 16, CW = 16;

  function automatic longint keep_top(longint v, int w, int width);
    if (w >= width) return v;
    if (w <= 0) return 0;
    return (v >>> (width - w)) <<< (width - w);
  endfunction

  function automatic longint model_sse(int taps, int prod_w, int n, logic [31:0] seed,
                                 int wl_in, int wl_tap [], int wl_out);
    longint h [], xf [], xr [];
    longint acc_f, acc_r, t, e, s2;
    logic [31:0] st;
    int s, acc_w;
    h = new[taps]; xf = new[taps]; xr = new[taps];
    s = 0;
    for (int k = 0; k < taps; k++) s += (k + 1 < taps - k) ? k + 1 : taps - k;
    for (int k = 0; k < taps; k++) begin
      h[k] = (longint'((k + 1 < taps - k) ? k + 1 : taps - k) * 32767) / s;
      xf[k] = 0; xr[k] = 0;
    end
    acc_w = prod_w + $clog2(taps);
    st = seed; e = 0;
    for (int i = 0; i < n; i++) begin
      for (int k = taps - 1; k > 0; k--) begin xf[k] = xf[k-1]; xr[k] = xr[k-1]; end
      xf[0] = longint'(signed'(st[31:16]));
      xr[0] = keep_top(xf[0], wl_in, DW);
      st ^= st << 13; st ^= st >> 17; st ^= st << 5;
      acc_f = 0; acc_r = 0;
      for (int k = 0; k < taps; k++) begin
        t = (xf[k] * h[k]) >>> (DW + CW - 1 - prod_w);
        if (t > (64'sd1 <<< (prod_w - 1)) - 1) t = (64'sd1 <<< (prod_w - 1)) - 1;
        acc_f += t;
        t = (xr[k] * h[k]) >>> (DW + CW - 1 - prod_w);
        if (t > (64'sd1 <<< (prod_w - 1)) - 1) t = (64'sd1 <<< (prod_w - 1)) - 1;
        acc_r += keep_top(t, wl_tap[k], prod_w);
      end
      acc_r = keep_top(acc_r, wl_out, acc_w);
      s2 = (acc_f - acc_r) * (acc_f - acc_r);
      e += s2;
    end
    return e;
  endfunction
endpackage
