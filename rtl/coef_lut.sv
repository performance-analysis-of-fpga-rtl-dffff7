// coef_lut - filter coefficient table, TAPS words of XT trits each (the ternary h(k) values).
//
// Written one word per clock through the write port (we, waddr, wdata); read asynchronously at
// raddr, which the program counter drives. The contents are not reset: all TAPS words must be
// written before the first filter run. Holding the coefficients in ternary in a table addressed
// by the program counter follows the original architecture; the write port is this
// implementation's way of
// loading it.
module coef_lut
  import tvl_pkg::*;
#(
  parameter int TAPS = 8,
  parameter int XT   = 4,
  parameter int AW   = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  trit_t [XT-1:0] wdata,
  input  logic [AW-1:0]  raddr,
  output trit_t [XT-1:0] rdata
);
  trit_t [XT-1:0] mem [TAPS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
