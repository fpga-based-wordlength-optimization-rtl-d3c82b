// tb_ber_analysis: transmitted nibbles are delivered back after a variable
// latency with known injected bit errors. Checks, every cycle, the error and
// bit counts and `done` against a running model (done rises the cycle after
// the last counted symbol, later symbols are ignored), that the FIFO never
// reports a pairing error in normal use, and that `overflow` is raised on a
// deliberate underrun and overrun and dropped again by `clear`.
module tb_ber_analysis;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, tx_valid = 0, rx_valid = 0;
  logic [3:0] tx_bits = 0, rx_bits = 0;
  logic [31:0] num_symbols = 0, bit_errors, bits_total;
  logic done, overflow;
  logic [3:0] pipe [$];

  ber_analysis #(.DEPTH(64)) dut (.clk, .rst_n, .clear, .tx_valid, .tx_bits, .rx_valid, .rx_bits,
    .num_symbols, .bit_errors, .bits_total, .done, .overflow);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int errs, nrx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      num_symbols = (run == 0) ? 32'd500 : 32'd1000;
      clear = 1; @(negedge clk); clear = 0;
      errs = 0; nrx = 0; pipe.delete();
      for (int n = 0; n < 2600; n++) begin
        tx_valid = (n < 2500) && (pipe.size() < 40) && 1'($urandom_range(0, 4) != 0);
        tx_bits  = 4'($urandom);
        rx_valid = (pipe.size() > 20 || (n >= 2500 && pipe.size() > 0)) && 1'($urandom_range(0, 4) != 0);
        if (rx_valid) begin
          logic [3:0] flip;
          flip = ($urandom_range(0, 9) == 0) ? 4'($urandom) : 4'd0;
          rx_bits = pipe.pop_front() ^ flip;
          if (nrx < num_symbols) errs += $countones(flip);
          nrx++;
        end
        if (tx_valid) pipe.push_back(tx_bits);
        @(negedge clk);
        checks++;
        if (bit_errors != errs || bits_total != 4 * ((nrx < num_symbols) ? nrx : num_symbols)
            || done != (nrx >= num_symbols)) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d step %0d: errors %0d/%0d bits %0d done %b after %0d symbols",
                                      run, n, bit_errors, errs, bits_total, done, nrx);
        end
      end
      tx_valid = 0; rx_valid = 0;
      @(negedge clk);
      checks++;
      if (bit_errors != errs || bits_total != 4 * num_symbols || !done) begin
        failures++; $display("FAIL run %0d errors %0d exp %0d bits %0d done %b", run, bit_errors, errs, bits_total, done);
      end
      checks++;
      if (overflow) begin failures++; $display("FAIL pairing error flagged"); end
    end
    // underrun: a received symbol with nothing transmitted
    num_symbols = 32'd10;
    clear = 1; @(negedge clk); clear = 0;
    rx_valid = 1; rx_bits = 4'd0; @(negedge clk); rx_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL underrun not flagged"); end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (overflow || bit_errors != 0 || bits_total != 0 || done) begin
      failures++; $display("FAIL clear did not reset the unit");
    end
    // overrun: DEPTH symbols fill the FIFO, one more overflows it
    tx_valid = 1;
    repeat (64) @(negedge clk);
    checks++;
    if (overflow) begin failures++; $display("FAIL full FIFO flagged too early"); end
    @(negedge clk); tx_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
