// treg - ternary register (TReg), the accumulator of the MAC unit.
//
// Holds W trits. `clr` loads zero (the accumulator starts every sum from zero), otherwise `en`
// loads d; clr wins when both are high. Asynchronous active-low reset to zero. The value is
// updated on the rising clock edge and visible at q right after it. Zero start and clocked
// update follow the original architecture; the reset and the clear/enable pins are this
// implementation's.
module treg
  import tvl_pkg::*;
#(
  parameter int W = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  trit_t [W-1:0] d,
  output trit_t [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end
endmodule
