// tb_bit_switch: exhaustive check of the wordlength mask for W = 8 and a
// randomised check for W = 20: for every wl, the output must equal the input
// with all bits below position W-wl cleared (wl >= W keeps everything).
module tb_bit_switch;
  int checks = 0, failures = 0;

  logic [7:0]  d8, q8;
  logic [7:0]  wl8;
  logic [19:0] d20, q20, e20;
  logic [7:0]  wl20;

  bit_switch #(.W(8))  dut8  (.din(d8),  .wl(wl8),  .dout(q8));
  bit_switch #(.W(20)) dut20 (.din(d20), .wl(wl20), .dout(q20));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 12; w++)
      for (int v = 0; v < 256; v++) begin
        logic [7:0] e;
        wl8 = 8'(w); d8 = 8'(v);
        #1;
        e = (w >= 8) ? 8'(v) : (w == 0 ? 8'h00 : (8'(v) >> (8 - w)) << (8 - w));
        checks++;
        if (q8 !== e) begin
          failures++;
          if (failures < 5) $display("FAIL W=8 wl=%0d din=%h dout=%h exp=%h", w, v, q8, e);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      d20 = 20'($urandom); wl20 = 8'($urandom_range(0, 24));
      #1;
      e20 = d20;
      for (int i = 0; i < 20; i++) if (i < 20 - int'(wl20)) e20[i] = 1'b0;
      checks++;
      if (q20 !== e20) begin
        failures++;
        if (failures < 5) $display("FAIL W=20 wl=%0d din=%h dout=%h exp=%h", wl20, d20, q20, e20);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
