// tb_input_data_generator: checks the samples against a model of the
// xorshift32 sequence (top DATA_W bits), the one-cycle latency, the hold
// when `en` is low and the identical restart after `load`.
module tb_input_data_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic signed [11:0] sample;
  logic valid;
  logic [31:0] st;

  input_data_generator #(.DATA_W(12), .SEED(32'hCAFE_F00D)) dut (.clk, .rst_n, .load, .en, .sample, .valid);

  always #5 clk = ~clk;

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
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
    for (int pass = 0; pass < 2; pass++) begin
      load = 1; @(negedge clk); load = 0;
      st = 32'hCAFE_F00D;
      for (int n = 0; n < 50; n++) begin
        en = (n % 5 != 4);
        @(negedge clk);
        checks++;
        if (valid !== en) begin failures++; $display("FAIL valid"); end
        if (en) begin
          checks++;
          if (sample !== signed'(st[31:20])) begin failures++; $display("FAIL sample %0d got %h exp %h", n, sample, st[31:20]); end
          st = nxt(st);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
