// tvl_rca - W-trit ternary ripple carry adder (TRCA).
//
// sum + 3^W * cout = a + b + cin. Each stage is a ternary full adder (tvl_pkg::tfa); the
// carry ripples from trit 0 upwards. The carry-in is a whole trit, so the same adder serves
// as "+0", "+1" and "+2" in the residue converters, which feed a constant carry-in. With a
// carry-in of at most 2 every internal carry stays in 0..2.
// Purely combinational. The ripple structure is the ternary ripple carry adder named by the
// original architecture; the full-adder truth table is plain base-3 addition.
module tvl_rca
  import tvl_pkg::*;
#(
  parameter int W = 2
) (
  input  trit_t [W-1:0] a,
  input  trit_t [W-1:0] b,
  input  trit_t         cin,
  output trit_t [W-1:0] sum,
  output trit_t         cout
);
  trit_t [W:0] c;

  assign c[0] = cin;
  for (genvar k = 0; k < W; k++) begin : g_stage
    assign {c[k+1], sum[k]} = tfa(a[k], b[k], c[k]);
  end
  assign cout = c[W];
endmodule
