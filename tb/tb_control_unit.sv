// tb_control_unit: drives the command byte stream directly. Checks that a
// write is acknowledged with A5 and lands in the parameter memory, that a
// read returns the stored byte, that start pulses once, that the unit stays
// busy until done, and that the result is returned most significant byte
// first, with the transmitter applying back-pressure.
module tb_control_unit;
  localparam int NP = 10, RB = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, tx_valid, tx_ready;
  logic [7:0] params [NP];
  logic start, busy, done = 0;
  logic [8*RB-1:0] result = '0;
  logic [7:0] got [$];
  int starts = 0;

  control_unit #(.NUM_PARAMS(NP), .RES_BYTES(RB)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready,
    .params, .start, .busy, .done, .result);

  always #5 clk = ~clk;

  // host side receiver, ready two cycles out of three
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 3;
    if (rst_n && tx_valid && tx_ready) got.push_back(tx_data);
  end
  assign tx_ready = (phase != 0);
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic put(logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_bytes(int n, logic [7:0] e [$], string what);
    int t = 0;
    while (got.size() < n && t < 200) begin @(negedge clk); t++; end
    checks++;
    if (got.size() != n) begin failures++; $display("FAIL %s: %0d bytes", what, got.size()); end
    else for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] !== e[i]) begin failures++; $display("FAIL %s byte %0d got %h exp %h", what, i, got[i], e[i]); end
    end
    got.delete();
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (params[3] !== 8'hFF) begin failures++; $display("FAIL reset value"); end
    for (int a = 0; a < NP; a++) begin
      put(8'h01); put(8'(a)); put(8'(a * 7 + 3));
      expect_bytes(1, '{8'hA5}, "ack");
    end
    for (int a = 0; a < NP; a++) begin
      checks++; if (params[a] !== 8'(a * 7 + 3)) begin failures++; $display("FAIL param %0d", a); end
    end
    put(8'h03); put(8'd6);
    expect_bytes(1, '{8'(6 * 7 + 3)}, "read");
    put(8'h77);                                // unknown command: ignored
    put(8'h02);
    checks++; if (!busy || starts != 1) begin failures++; $display("FAIL start/busy"); end
    put(8'h01);                                // ignored while busy
    repeat (10) @(negedge clk);
    checks++; if (got.size() != 0 || !busy) begin failures++; $display("FAIL spoke while busy"); end
    result = 32'hDEAD_BEEF;
    done = 1;
    expect_bytes(4, '{8'hDE, 8'hAD, 8'hBE, 8'hEF}, "result");
    checks++; if (busy) begin failures++; $display("FAIL still busy"); end
    done = 0;
    checks++; if (starts != 1) begin failures++; $display("FAIL start count %0d", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
