// trns_conv_m1 - residue of a 2N-trit number modulo 3^N - 1.
//
// Since 3^N = 1 (mod 3^N-1), X = Xhi*3^N + Xlo = Xhi + Xlo. Three N-trit ternary ripple carry
// adders form Xhi + Xlo with carry-in 0, 1 and 2 in parallel; the carry out of the carry-in-0
// adder (0 or 1) folds the 3^N weight back in as +1 and steers a ternary multiplexer (TMUX) to
// the matching adder. That one fold is exact: the selected sum never overflows N trits.
// The raw result lies in 0 .. 3^N-1, where 3^N-1 (all trits 2) is a second code for 0; a final
// compare replaces it with 0 so that the residue is always below the modulus, as the modular
// adder downstream requires. The three adders and the carry-steered TMUX follow the original
// architecture; the
// final clean-up of the all-2 code is this implementation's addition.
// Purely combinational. Xhi and Xlo may be any N-trit values.
module trns_conv_m1
  import tvl_pkg::*;
#(
  parameter int N = 2
) (
  input  trit_t [N-1:0] x_hi,
  input  trit_t [N-1:0] x_lo,
  output trit_t [N-1:0] r,
  output trit_t         sel      // carry out that steered the TMUX (observability)
);
  trit_t [N-1:0] s0, s1, s2, raw;
  trit_t         c0, c1_unused, c2_unused;

  tvl_rca #(.W(N)) u_add0 (.a(x_hi), .b(x_lo), .cin(2'd0), .sum(s0), .cout(c0));
  tvl_rca #(.W(N)) u_add1 (.a(x_hi), .b(x_lo), .cin(2'd1), .sum(s1), .cout(c1_unused));
  tvl_rca #(.W(N)) u_add2 (.a(x_hi), .b(x_lo), .cin(2'd2), .sum(s2), .cout(c2_unused));

  assign sel = c0;
  always_comb begin
    unique case (c0)
      2'd1:    raw = s1;
      2'd2:    raw = s2;
      default: raw = s0;
    endcase
  end

  // 3^N-1 is all trits 2.
  localparam trit_t [N-1:0] ALL2 = {N{2'd2}};
  assign r = (raw == ALL2) ? '0 : raw;
endmodule
