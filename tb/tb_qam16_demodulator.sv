// tb_qam16_demodulator: every 16-QAM point with random offsets below A/2
// must decode to its Gray bits; one-cycle latency.
module tb_qam16_demodulator;
  localparam int A = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [11:0] ii = 0, iq = 0;
  logic [3:0] bits, eb;
  logic out_valid;

  qam16_demodulator #(.SYM_W(12), .AMP(A)) dut (.clk, .rst_n, .in_valid, .in_i(ii), .in_q(iq), .bits, .out_valid);

  always #5 clk = ~clk;

  function automatic int lvl(logic b1, logic b0);
    int m = b0 ? A : 3 * A;
    return b1 ? m : -m;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      eb = 4'($urandom);
      ii = 12'(lvl(eb[3], eb[2]) + $urandom_range(0, A - 2) - (A / 2 - 1));
      iq = 12'(lvl(eb[1], eb[0]) + $urandom_range(0, A - 2) - (A / 2 - 1));
      in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid || bits !== eb) begin failures++; $display("FAIL (%0d,%0d) -> %b exp %b", ii, iq, bits, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
