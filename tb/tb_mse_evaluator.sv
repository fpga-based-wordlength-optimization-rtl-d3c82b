// tb_mse_evaluator: random sample pairs with gaps; checks the accumulated
// sum of squared errors against a testbench model, that counting stops at
// num_samples with done raised, saturation of the sum, and clear.
module tb_mse_evaluator;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [W-1:0] dut_s = 0, ref_s = 0;
  logic [31:0] num_samples = 0, count;
  logic [63:0] sse;
  logic [19:0] sse_small;
  logic [31:0] cnt_small;
  logic done, done_small;

  mse_evaluator #(.W(W), .SSE_W(64)) dut (
    .clk, .rst_n, .clear, .in_valid, .dut(dut_s), .ref_s, .num_samples, .sse, .count, .done);
  mse_evaluator #(.W(8), .SSE_W(20)) dut_sat (
    .clk, .rst_n, .clear, .in_valid, .dut(dut_s[7:0]), .ref_s(ref_s[7:0]), .num_samples,
    .sse(sse_small), .count(cnt_small), .done(done_small));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e, es;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      num_samples = 32'(100 + 250 * run);
      clear = 1; @(negedge clk); clear = 0;
      e = 0; es = 0; n = 0;
      while (n < num_samples + 20) begin
        in_valid = 1'($urandom);
        dut_s = W'($urandom); ref_s = W'($urandom);
        if (run == 1) ref_s = dut_s + W'($urandom_range(0, 6)) - W'(3);
        if (in_valid && n < num_samples) begin
          longint d, ds;
          d = longint'(ref_s) - longint'(dut_s);
          e += longint'(d * d);
          ds = longint'(signed'(ref_s[7:0])) - longint'(signed'(dut_s[7:0]));
          es += longint'(ds * ds);
        end
        @(negedge clk);
        if (in_valid) n++;
      end
      in_valid = 0;
      @(negedge clk);
      checks++; if (sse !== e) begin failures++; $display("FAIL run %0d sse %0d exp %0d", run, sse, e); end
      checks++; if (count !== num_samples || !done) begin failures++; $display("FAIL count %0d done %b", count, done); end
      checks++;
      if (sse_small !== ((es > 20'hFFFFF) ? 20'hFFFFF : 20'(es))) begin
        failures++; $display("FAIL saturation %h exp %0d", sse_small, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
