// tvl_lt - W-trit ternary magnitude comparator: lt = (a < b).
//
// Scans from the most significant trit: the first trit where the operands differ decides.
// Purely combinational. It is the logic comparator of the modular (TRNS) adder, which decides
// whether the modulus has to be subtracted from a sum.
module tvl_lt
  import tvl_pkg::*;
#(
  parameter int W = 2
) (
  input  trit_t [W-1:0] a,
  input  trit_t [W-1:0] b,
  output logic          lt
);
  always_comb begin
    lt = 1'b0;
    for (int k = 0; k < W; k++) begin
      if (a[k] < b[k]) lt = 1'b1;
      else if (a[k] > b[k]) lt = 1'b0;
    end
  end
endmodule
