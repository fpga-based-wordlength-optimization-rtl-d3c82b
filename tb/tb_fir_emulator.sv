// tb_fir_emulator: end-to-end runs of the FIR emulation system over its
// serial link, with two batch lanes. The host writes the run length and the
// wordlengths of both lanes, starts, and compares the two returned 64-bit
// error sums with the bit-accurate model in fir_model_pkg. Lane 0 at full
// wordlength must give 0. Also checks the parameter read-back, that a run
// is repeatable, and that busy covers the run. A second instance is the
// 29th-order configuration (30 taps, 24-bit products), also with two
// lanes, and is checked the same way.
module tb_fir_emulator;
  import fir_model_pkg::*;
  localparam int CPB = 8, TAPS = 15, NS = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rxd, txd, busy;
  logic [127:0] sse;

  fir_emulator #(.CLKS_PER_BIT(CPB), .TAPS(TAPS), .BATCH(2)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .busy, .sse);
  uart_host #(.CPB(CPB)) host (.clk, .txd(rxd), .rxd(txd));

  localparam int TAPS30 = 30;
  logic rxd30, txd30, busy30;
  logic [127:0] sse30;
  fir_emulator #(.CLKS_PER_BIT(CPB), .TAPS(TAPS30), .PROD_W(24), .BATCH(2)) dut30 (
    .clk, .rst_n, .uart_rxd(rxd30), .uart_txd(txd30), .busy(busy30), .sse(sse30));
  uart_host #(.CPB(CPB)) host30 (.clk, .txd(rxd30), .rxd(txd30));

  task automatic wr30(int a, int d);
    logic [7:0] b; bit ok;
    host30.send_byte(8'h01); host30.send_byte(8'(a)); host30.send_byte(8'(d));
    host30.get_byte(b, ok, 40 * CPB);
    checks++;
    if (!ok || b !== 8'hA5) begin failures++; $display("FAIL no ack for 30-tap write %0d", a); end
  endtask

  task automatic fir30();
    int wl [2][TAPS30];
    int wl_dyn [] = new[TAPS30];
    int wl_in [2], wl_out [2];
    logic [7:0] b; bit ok;
    longint unsigned r [2];
    longint e;
    wl_in  = '{16, 0};  wl_in[1]  = $urandom_range(8, 16);
    wl_out = '{29, 0};  wl_out[1] = $urandom_range(18, 29);
    wr30(0, 0); wr30(1, 0); wr30(2, NS >> 8); wr30(3, NS & 255);
    for (int l = 0; l < 2; l++) begin
      wr30(4 + l * (TAPS30 + 2), wl_in[l]);
      for (int k = 0; k < TAPS30; k++) begin
        wl[l][k] = $urandom_range(8, 24);
        wr30(5 + l * (TAPS30 + 2) + k, wl[l][k]);
      end
      wr30(5 + l * (TAPS30 + 2) + TAPS30, wl_out[l]);
    end
    host30.send_byte(8'h02);
    r = '{0, 0};
    for (int i = 0; i < 16; i++) begin          // lane 1 first, MSB first
      host30.get_byte(b, ok, 20 * NS + 100 * CPB);
      checks++;
      if (!ok) begin failures++; $display("FAIL 30-tap result byte missing"); end
      r[1 - i / 8] = (r[1 - i / 8] << 8) | 64'(b);
    end
    for (int l = 0; l < 2; l++) begin
      foreach (wl_dyn[k]) wl_dyn[k] = wl[l][k];
      e = model_sse(TAPS30, 24, NS, 32'h1F2E_3D4C, wl_in[l], wl_dyn, wl_out[l]);
      checks++;
      if (r[l] != e || e == 0) begin failures++; $display("FAIL 30-tap lane %0d sse %0d exp %0d", l, r[l], e); end
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  task automatic run(output longint unsigned r [2]);
    logic [7:0] b; bit ok;
    host.send_byte(8'h02);
    for (int l = 1; l >= 0; l--) begin
      r[l] = 0;
      for (int i = 0; i < 8; i++) begin
        host.get_byte(b, ok, 20 * NS + 100 * CPB);
        checks++;
        if (!ok) begin failures++; $display("FAIL result byte missing"); end
        r[l] = (r[l] << 8) | 64'(b);
      end
    end
  endtask

  initial begin
    int wl1 [] = new[TAPS];
    int wlf [] = new[TAPS];
    longint unsigned r [2], r2 [2];
    longint e1;
    logic [7:0] b; bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    wr(0, 0); wr(1, 0); wr(2, NS >> 8); wr(3, NS & 255);
    for (int k = 0; k < TAPS; k++) begin wl1[k] = $urandom_range(4, 16); wlf[k] = 16; end
    wl1[3] = 0;
    // lane 0: full wordlength; lane 1: reduced taps and a 10-bit input
    wr(4, 16); for (int k = 0; k < TAPS; k++) wr(5 + k, 16); wr(4 + TAPS + 1, 20);
    wr(4 + TAPS + 2, 10);
    for (int k = 0; k < TAPS; k++) wr(4 + TAPS + 3 + k, wl1[k]);
    wr(4 + 2 * TAPS + 3, 20);
    host.send_byte(8'h03); host.send_byte(8'(4 + TAPS + 3 + 5));
    host.get_byte(b, ok, 40 * CPB);
    checks++; if (!ok || b !== 8'(wl1[5])) begin failures++; $display("FAIL read-back"); end
    run(r);
    e1 = model_sse(TAPS, 16, NS, 32'h1F2E_3D4C, 10, wl1, 20);
    checks++; if (r[0] != 0) begin failures++; $display("FAIL lane 0 sse %0d", r[0]); end
    checks++; if (r[1] != e1 || e1 == 0) begin failures++; $display("FAIL lane 1 sse %0d exp %0d", r[1], e1); end
    checks++; if (sse[127:64] != r[1] || sse[63:0] != r[0]) begin failures++; $display("FAIL sse port"); end
    // repeat: identical result
    run(r2);
    checks++; if (r2[1] != r[1]) begin failures++; $display("FAIL repeat %0d vs %0d", r2[1], r[1]); end
    // lane 0 now with output wordlength 12 of 20
    wr(4 + TAPS + 1, 12);
    run(r);
    e1 = model_sse(TAPS, 16, NS, 32'h1F2E_3D4C, 16, wlf, 12);
    checks++; if (r[0] != e1 || e1 == 0) begin failures++; $display("FAIL lane 0 output wl sse %0d exp %0d", r[0], e1); end
    checks++; if (busy) begin failures++; $display("FAIL busy after run"); end
    fir30();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
