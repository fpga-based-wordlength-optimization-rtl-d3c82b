// tb_wlo_full: one complete evaluation on each emulation system with every
// parameter of the top at its default (115200-baud bit time at 100 MHz,
// 15-tap FIR with one lane, 64-symbol VV window). The FIR run streams 20000
// samples and its error sum is checked against the bit-accurate model; the
// VV run streams 375000 16-QAM symbols, i.e. 1.5 million bits, at a noise
// level giving a bit error rate near 7e-3, and its counts are
// checked for plausibility. Both runs must take one cycle per sample or
// symbol plus a short pipeline tail (busy time measured).
module tb_wlo_full;
  import fir_model_pkg::*;
  localparam int CPB = 868, TAPS = 15, NF = 20000, NV = 375000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic fir_rxd, fir_txd, fir_busy, vv_rxd, vv_txd, vv_busy, vv_fifo_error;
  logic [63:0] fir_sse;
  logic [31:0] vv_bit_errors, vv_bits_total;
  logic signed [15:0] vv_phase_est;
  int fir_busy_cycles = 0, vv_busy_cycles = 0;

  wlo_top dut (
    .clk, .rst_n, .fir_rxd, .fir_txd, .fir_busy, .fir_sse,
    .vv_rxd, .vv_txd, .vv_busy, .vv_bit_errors, .vv_bits_total, .vv_fifo_error, .vv_phase_est);
  uart_host #(.CPB(CPB)) fhost (.clk, .txd(fir_rxd), .rxd(fir_txd));
  uart_host #(.CPB(CPB)) vhost (.clk, .txd(vv_rxd), .rxd(vv_txd));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (fir_busy) fir_busy_cycles++;
    if (vv_busy)  vv_busy_cycles++;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fwr(int a, int d);
    logic [7:0] b; bit ok;
    fhost.send_byte(8'h01); fhost.send_byte(8'(a)); fhost.send_byte(8'(d));
    fhost.get_byte(b, ok, 40 * CPB);
    checks++; if (!ok || b !== 8'hA5) begin failures++; $display("FAIL fir ack"); end
  endtask
  task automatic vwr(int a, int d);
    logic [7:0] b; bit ok;
    vhost.send_byte(8'h01); vhost.send_byte(8'(a)); vhost.send_byte(8'(d));
    vhost.get_byte(b, ok, 40 * CPB);
    checks++; if (!ok || b !== 8'hA5) begin failures++; $display("FAIL vv ack"); end
  endtask

  task automatic fir_side();
    int wl [] = new[TAPS];
    logic [7:0] b; bit ok;
    longint unsigned r;
    longint e;
    fwr(0, 0); fwr(1, NF >> 16); fwr(2, (NF >> 8) & 255); fwr(3, NF & 255);
    for (int k = 0; k < TAPS; k++) begin
      wl[k] = 6 + (k % 8);
      fwr(5 + k, wl[k]);
    end
    fhost.send_byte(8'h02);
    r = 0;
    for (int i = 0; i < 8; i++) begin
      fhost.get_byte(b, ok, 2 * NF + 20 * CPB);
      checks++; if (!ok) begin failures++; $display("FAIL fir result missing"); end
      r = (r << 8) | 64'(b);
    end
    e = model_sse(TAPS, 16, NF, 32'h1F2E_3D4C, 16, wl, 20);
    $display("FIR: sse %0d (model %0d), MSE %e of full scale^2, busy %0d cycles",
             r, e, real'(r) / NF / (2.0 ** 30), fir_busy_cycles);
    checks++; if (r != e || r == 0) begin failures++; $display("FAIL fir sse"); end
    checks++; if (fir_busy_cycles < NF || fir_busy_cycles > NF + 10) begin failures++; $display("FAIL fir rate"); end
  endtask

  task automatic vv_side();
    logic [7:0] b; bit ok;
    logic [63:0] r;
    real ber;
    vwr(0, 0); vwr(1, NV >> 16); vwr(2, (NV >> 8) & 255); vwr(3, NV & 255);
    vwr(4, 8); vwr(5, 8); vwr(6, 12); vwr(7, 12); vwr(8, 10);
    vwr(9, 95); vwr(10, 5);
    vhost.send_byte(8'h02);
    for (int i = 0; i < 8; i++) begin
      vhost.get_byte(b, ok, 2 * NV + 20 * CPB);
      checks++; if (!ok) begin failures++; $display("FAIL vv result missing"); end
      r = (r << 8) | 64'(b);
    end
    ber = real'(r[63:32]) / real'(r[31:0]);
    $display("VV: %0d errors in %0d bits, BER %f, busy %0d cycles", r[63:32], r[31:0], ber, vv_busy_cycles);
    checks++; if (r[31:0] != 32'(4 * NV) || vv_fifo_error) begin failures++; $display("FAIL vv bit count"); end
    checks++; if (ber < 1e-4 || ber > 5e-2) begin failures++; $display("FAIL implausible BER"); end
    checks++; if (vv_busy_cycles < NV || vv_busy_cycles > NV + 64) begin failures++; $display("FAIL vv rate"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    fork
      fir_side();
      vv_side();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
