// tb_uart_tx: sends random bytes through the transmitter and decodes the
// serial line in the testbench, sampling each bit at its middle; checks
// start bit, data bits (LSB first), stop bit, the frame length of 10 bit
// times and the ready handshake.
module tb_uart_tx;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] data;
  logic valid = 0, ready, txd;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .txd);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (txd !== 1'b1 || ready !== 1'b1) begin failures++; $display("FAIL idle"); end
    for (int n = 0; n < 40; n++) begin
      b = 8'($urandom);
      data = b; valid = 1;
      @(negedge clk);                 // byte taken at this edge, start bit now on txd
      valid = 0;
      data = 8'hXX;
      repeat (CPB / 2 - 1) @(negedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++; if (got !== b) begin failures++; $display("FAIL data got %h exp %h", got, b); end
      busy_cycles = 0;
      while (!ready) begin @(negedge clk); busy_cycles++; end
      // frame is 10*CPB cycles from the accepting edge; 9.5*CPB have passed
      checks++;
      if (busy_cycles != CPB / 2 + 1) begin failures++; $display("FAIL frame length, tail %0d", busy_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
