// tb_transmitter: checks that the symbol levels follow the Gray mapping of
// the emitted bits (independently decoded here), that every one of the 16
// symbols occurs, that the bits follow the xorshift sequence, and the
// one-cycle valid timing and restart.
module tb_transmitter;
  localparam int A = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [3:0] bits;
  logic signed [11:0] si, sq;
  logic valid;
  int seen [16];
  logic [31:0] st;

  transmitter #(.SYM_W(12), .AMP(A), .SEED(32'h0BAD_CAFE)) dut (
    .clk, .rst_n, .load, .en, .bits, .sym_i(si), .sym_q(sq), .valid);

  always #5 clk = ~clk;

  function automatic int lvl(logic b1, logic b0);
    int m = b0 ? A : 3 * A;
    return b1 ? m : -m;
  endfunction

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    st = 32'h0BAD_CAFE;
    for (int n = 0; n < 400; n++) begin
      en = (n % 7 != 3);
      @(negedge clk);
      checks++;
      if (valid !== en) begin failures++; $display("FAIL valid"); end
      if (en) begin
        checks++;
        if (bits !== st[31:28] || int'(si) != lvl(bits[3], bits[2]) || int'(sq) != lvl(bits[1], bits[0])) begin
          failures++;
          if (failures < 6) $display("FAIL bits %b sym (%0d,%0d)", bits, si, sq);
        end
        seen[bits]++;
        st = nxt(st);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL symbol %0d never sent", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
