// tb_vv_emulator: end-to-end runs of the phase-recovery emulation over its
// serial link. Checks: bits counted = 4 * symbols; no errors without noise
// or with phase noise alone (the recovery tracks it); errors appear with
// additive noise and grow with it; a coarse phase wordlength raises the
// error count under phase noise; identical configurations repeat exactly;
// the transmit/receive pairing is never lost.
module tb_vv_emulator;
  localparam int CPB = 8, NS = 3000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rxd, txd, busy, fifo_error;
  logic [31:0] bit_errors, bits_total;
  logic signed [15:0] phase_est;

  vv_emulator #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .busy,
    .bit_errors, .bits_total, .fifo_error, .phase_est);
  uart_host #(.CPB(CPB)) host (.clk, .txd(rxd), .rxd(txd));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    logic [7:0] b; bit ok;
    host.send_byte(8'h01); host.send_byte(8'(a)); host.send_byte(8'(d));
    host.get_byte(b, ok, 40 * CPB);
    checks++;
    if (!ok || b !== 8'hA5) begin failures++; $display("FAIL no ack for write %0d", a); end
  endtask

  task automatic run(output int errs, output int nbits);
    logic [7:0] b; bit ok;
    logic [63:0] r;
    host.send_byte(8'h02);
    for (int i = 0; i < 8; i++) begin
      host.get_byte(b, ok, 4 * NS + 200 * CPB);
      checks++;
      if (!ok) begin failures++; $display("FAIL result byte missing"); end
      r = (r << 8) | 64'(b);
    end
    errs = int'(r[63:32]); nbits = int'(r[31:0]);
    checks++;
    if (nbits != 4 * NS) begin failures++; $display("FAIL bits counted %0d", nbits); end
    checks++;
    if (fifo_error) begin failures++; $display("FAIL pairing lost"); end
  endtask

  task automatic cfg(int wm, int wp, int w2, int w4, int wph, int sigma, int pn);
    wr(4, wm); wr(5, wp); wr(6, w2); wr(7, w4); wr(8, wph); wr(9, sigma); wr(10, pn);
  endtask

  initial begin
    int e0, e_pn, e_lo, e_hi, e_full, e_coarse, e_rep, n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    wr(0, 0); wr(1, 0); wr(2, NS >> 8); wr(3, NS & 255);
    cfg(8, 8, 12, 12, 10, 0, 0);   run(e0, n);
    cfg(8, 8, 12, 12, 10, 0, 40);  run(e_pn, n);
    cfg(8, 8, 12, 12, 10, 50, 0);  run(e_lo, n);
    cfg(8, 8, 12, 12, 10, 120, 0); run(e_hi, n);
    cfg(8, 8, 12, 12, 10, 60, 60); run(e_full, n);
    cfg(8, 8, 12, 12, 3, 60, 60);  run(e_coarse, n);
    cfg(8, 8, 12, 12, 10, 60, 60); run(e_rep, n);
    $display("errors: clean %0d, phase noise %0d, sigma50 %0d, sigma120 %0d, full %0d, coarse phase %0d, repeat %0d",
             e0, e_pn, e_lo, e_hi, e_full, e_coarse, e_rep);
    checks++; if (e0 != 0) begin failures++; $display("FAIL errors without noise"); end
    checks++; if (e_pn != 0) begin failures++; $display("FAIL errors with phase noise only"); end
    checks++; if (!(e_hi > e_lo && e_hi > 0)) begin failures++; $display("FAIL noise does not raise errors"); end
    checks++; if (!(e_coarse > e_full)) begin failures++; $display("FAIL coarse phase not worse"); end
    checks++; if (e_rep != e_full) begin failures++; $display("FAIL not repeatable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
