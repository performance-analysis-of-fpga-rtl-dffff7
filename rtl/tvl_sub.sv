// tvl_sub - W-trit ternary ripple borrow subtractor.
//
// diff = a - b (mod 3^W); bout = 1 when a < b. Each stage subtracts one trit and the incoming
// borrow, adding 3 back when the result is negative. Purely combinational. It is the ternary
// subtractor of the modular (TRNS) adder, which removes the modulus from a sum that reached it.
module tvl_sub
  import tvl_pkg::*;
#(
  parameter int W = 2
) (
  input  trit_t [W-1:0] a,
  input  trit_t [W-1:0] b,
  output trit_t [W-1:0] diff,
  output logic          bout
);
  logic [W:0] bw;

  assign bw[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_stage
    logic signed [3:0] d;
    assign d       = $signed({2'b00, a[k]}) - $signed({2'b00, b[k]}) - $signed({3'b000, bw[k]});
    assign bw[k+1] = d[3];
    assign diff[k] = d[3] ? trit_t'(d + 4'sd3) : trit_t'(d);
  end
  assign bout = bw[W];
endmodule
