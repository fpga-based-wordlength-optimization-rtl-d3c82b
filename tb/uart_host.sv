// uart_host: testbench model of the host computer's serial port.
// send_byte() drives an 8N1 frame on `txd`; every frame seen on `rxd` is
// decoded (sampled at bit middles) and queued, and get_byte() takes the
// oldest one, failing with ok = 0 if none arrives within `max_cycles`.
module uart_host #(
  parameter int CPB = 8
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  logic [7:0] rxq [$];

  initial txd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    txd = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin txd = b[i]; repeat (CPB) @(negedge clk); end
    txd = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  task automatic get_byte(output logic [7:0] b, output bit ok, input int max_cycles);
    int t = 0;
    while (rxq.size() == 0 && t < max_cycles) begin @(negedge clk); t++; end
    ok = (rxq.size() != 0);
    b  = ok ? rxq.pop_front() : 8'h00;
  endtask

  initial begin
    logic [7:0] b;
    @(negedge clk);
    forever begin
      @(negedge clk);
      if (rxd === 1'b0) begin
        repeat (CPB / 2) @(negedge clk);
        if (rxd === 1'b0) begin
          for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = rxd; end
          repeat (CPB) @(negedge clk);
          if (rxd === 1'b1) rxq.push_back(b);
        end
      end
    end
  end
endmodule
