// tb_xorshift_rng: checks the generator against a software model of the
// xorshift32 recurrence, that `en` low holds the value, and that `load`
// restarts the sequence from the seed.
module tb_xorshift_rng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [31:0] rnd, model;

  xorshift_rng #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .load, .en, .rnd);

  always #5 clk = ~clk;

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (rnd !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rnd, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model = 32'h1234_5678;
    check(model, "reset value");
    en = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      model = nxt(model);
      check(model, "sequence");
    end
    en = 0;
    repeat (3) @(negedge clk);
    check(model, "hold");
    load = 1;
    @(negedge clk);
    load = 0;
    check(32'h1234_5678, "reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
