// tb_cordic: rotation mode against x*cos - y*sin, x*sin + y*cos and
// vectoring mode against atan2, computed with real arithmetic for random
// vectors in all four quadrants; tolerances of 2 LSB and 0.1 degree plus
// the angle of 4 LSB at the vector's length (the
// vectoring magnitude, unused by the design, is allowed 2 LSB + 0.2%).
module tb_cordic;
  localparam int W = 14;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = 0, y = 0, rxo, ryo, vxo, vyo;
  logic signed [15:0] ang = 0, rang, vang;
  real PI = 3.14159265358979;

  cordic #(.W(W), .ITER(14), .VECTORING(1'b0)) u_rot (
    .clk, .rst_n, .en, .x, .y, .ang, .xo(rxo), .yo(ryo), .ang_o(rang));
  cordic #(.W(W), .ITER(14), .VECTORING(1'b1)) u_vec (
    .clk, .rst_n, .en, .x, .y, .ang(16'sd0), .xo(vxo), .yo(vyo), .ang_o(vang));

  always #5 clk = ~clk;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, ex, ey, ea, mag, da;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      x = W'($urandom_range(0, 5000)) - W'(2500);
      y = W'($urandom_range(0, 5000)) - W'(2500);
      if (n < 4) begin x = (n % 2) ? -14'sd2000 : 14'sd2000; y = (n / 2) ? -14'sd1 : 14'sd0; end
      ang = 16'($urandom);
      en = 1;
      @(negedge clk);
      en = 0;
      a = real'(ang) / 65536.0 * 2.0 * PI;
      ex = real'(x) * $cos(a) - real'(y) * $sin(a);
      ey = real'(x) * $sin(a) + real'(y) * $cos(a);
      checks++;
      if (fabs(real'(rxo) - ex) > 2.0 || fabs(real'(ryo) - ey) > 2.0) begin
        failures++;
        if (failures < 10) $display("FAIL rot (%0d,%0d) by %0d: (%0d,%0d) exp (%f,%f)", x, y, ang, rxo, ryo, ex, ey);
      end
      mag = $sqrt(real'(x) * real'(x) + real'(y) * real'(y));
      if (mag > 20.0) begin
        ea = $atan2(real'(y), real'(x)) / (2.0 * PI) * 65536.0;
        da = real'(vang) - ea;
        if (da > 32768.0) da -= 65536.0;
        if (da < -32768.0) da += 65536.0;
        checks++;
        if (fabs(da) > 18.0 + 4.0 / mag * 65536.0 / (2.0 * PI)) begin
          failures++;
          if (failures < 10) $display("FAIL vec (%0d,%0d): ang %0d exp %f", x, y, vang, ea);
        end
        checks++;
        if (fabs(real'(vxo) - mag) > 2.0 + 0.002 * mag) begin failures++; $display("FAIL magnitude %0d exp %f", vxo, mag); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
