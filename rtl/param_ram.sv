// param_ram: the byte-wide parameter memory written by the host computer.
//
// DEPTH bytes, one synchronous write port and one synchronous read port used
// by the control unit, plus every word visible in parallel on `words` so the
// emulated hardware (bit switches, channel settings, run length) can use its
// parameters directly. Every byte resets to RST_VAL; with bit switches that
// saturate at full width, the default 8'hFF means "all wordlengths full".
// Read data appears one cycle after `re`. The memory itself is named in the
// framework (parameters flow from the host through a RAM into the
// emulation); its width, depth and ports are this design's choices.
module param_ram #(
  parameter int unsigned DEPTH   = 16,
  parameter logic [7:0]  RST_VAL = 8'hFF,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  output logic [7:0]    words [DEPTH]
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= RST_VAL;
      rdata <= '0;
    end else begin
      if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
      if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : 8'h00;
    end
  end

  assign words = mem;
endmodule
