// tb_channel: (1) without impairments the symbol passes unchanged after
// two cycles; (2) with phase noise only, the output equals the input rotated
// by a testbench model of the random walk (same xorshift seed), within
// 3 LSB; (3) with noise only, the measured noise variance matches
// (147.8*sigma/128)^2 within 10% and its mean is near zero.
module tb_channel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, in_valid = 0;
  logic signed [11:0] ii = 0, iq = 0, oi, oq;
  logic [7:0] sigma = 0, pn_step = 0;
  logic out_valid;
  real PI = 3.14159265358979;

  channel #(.SYM_W(12)) dut (
    .clk, .rst_n, .load, .in_valid, .in_i(ii), .in_q(iq), .sigma, .pn_step,
    .out_i(oi), .out_q(oq), .out_valid);

  always #5 clk = ~clk;

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction
  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected outputs, two cycles behind the inputs
  real ei [$], eq [$];
  logic signed [11:0] hi, hq;
  real sum, sum2;
  int  nn;
  int  mode;

  always @(negedge clk) if (rst_n && out_valid) begin
    real xi, xq;
    xi = ei.pop_front(); xq = eq.pop_front();
    if (mode < 2) begin
      checks++;
      if (fabs(real'(oi) - xi) > 3.0 || fabs(real'(oq) - xq) > 3.0) begin
        failures++;
        if (failures < 6) $display("FAIL mode %0d out (%0d,%0d) exp (%f,%f)", mode, oi, oq, xi, xq);
      end
    end else begin
      sum += real'(oi) - xi; sum2 += (real'(oi) - xi) * (real'(oi) - xi);
      sum += real'(oq) - xq; sum2 += (real'(oq) - xq) * (real'(oq) - xq);
      nn += 2;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sp;
    int ph;
    real a, var_m, var_e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (mode = 0; mode < 3; mode++) begin
      sigma   = (mode == 2) ? 8'd60 : 8'd0;
      pn_step = (mode == 1) ? 8'd200 : 8'd0;
      load = 1; @(negedge clk); load = 0;
      sp = 32'h85EB_CA6B; ph = 0;
      sum = 0; sum2 = 0; nn = 0;
      for (int n = 0; n < 3000; n++) begin
        in_valid = 1'($urandom_range(0, 3) != 0);
        ii = 12'($urandom_range(0, 1600)) - 12'd800;
        iq = 12'($urandom_range(0, 1600)) - 12'd800;
        if (in_valid) begin
          a = real'(ph) / 65536.0 * 2.0 * PI;
          ei.push_back(real'(ii) * $cos(a) - real'(iq) * $sin(a));
          eq.push_back(real'(ii) * $sin(a) + real'(iq) * $cos(a));
          ph = sp[31] ? ph + int'(pn_step) : ph - int'(pn_step);
          ph = int'(16'(ph));
          if (ph > 32767) ph -= 65536;
          sp = nxt(sp);
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (ei.size() != 0) begin failures++; $display("FAIL mode %0d: %0d outputs missing", mode, ei.size()); ei.delete(); eq.delete(); end
    end
    var_m = sum2 / nn;
    var_e = (147.8 * 60.0 / 128.0) * (147.8 * 60.0 / 128.0);
    checks++;
    if (fabs(var_m / var_e - 1.0) > 0.1 || fabs(sum / nn) > 2.0) begin
      failures++; $display("FAIL noise variance %f exp %f, mean %f", var_m, var_e, sum / nn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
