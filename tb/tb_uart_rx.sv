// tb_uart_rx: drives 8N1 frames of random bytes at the configured bit time
// (including back-to-back frames and a frame with a broken stop bit, which
// must be dropped) and checks every byte delivered by the receiver.
module tb_uart_rx;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid;
  logic [7:0] q[$];
  int nrx = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid);

  always #5 clk = ~clk;

  task automatic send(logic [7:0] b, logic stop);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1;
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    nrx++;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected byte %h at %0t", data, $time); end
    else begin
      logic [7:0] e;
      e = q.pop_front();
      if (data !== e) begin failures++; $display("FAIL got %h exp %h", data, e); end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 30; n++) begin
      b = 8'($urandom);
      q.push_back(b);
      send(b, 1'b1);
      if (n % 3 == 0) repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    $display("bad frame at %0t", $time);
    send(8'h5A, 1'b0);                 // framing error: dropped
    repeat (2 * CPB) @(negedge clk);
    b = 8'hC3; q.push_back(b); send(b, 1'b1);
    repeat (2 * CPB) @(negedge clk);
    checks++;
    if (nrx != 31 || q.size() != 0) begin failures++; $display("FAIL received %0d bytes", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
