// tb_param_ram: checks the reset value, random writes and synchronous reads
// against a shadow array, and the parallel view of all words.
module tb_param_ram;
  localparam int DEPTH = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [3:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] words [DEPTH];
  logic [7:0] shadow [DEPTH];

  param_ram #(.DEPTH(DEPTH), .RST_VAL(8'hFF)) dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata, .words);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = 8'hFF;
      checks++; if (words[i] !== 8'hFF) begin failures++; $display("FAIL reset word %0d", i); end
    end
    for (int n = 0; n < 300; n++) begin
      we = 1'($urandom); waddr = 4'($urandom_range(0, DEPTH - 1)); wdata = 8'($urandom);
      re = 1; raddr = 4'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL read %0d got %h exp %h", raddr, rdata, shadow[raddr]); end
      if (we) shadow[waddr] = wdata;
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (words[i] !== shadow[i]) begin failures++; $display("FAIL word %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
