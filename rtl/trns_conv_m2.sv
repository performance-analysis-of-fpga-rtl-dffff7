// trns_conv_m2 - residue of a 2N-trit number modulo 3^N - 2 (N >= 2).
//
// Since 3^N = 2 (mod 3^N-2), X = Xhi*3^N + Xlo = 2*Xhi + Xlo. One adder doubles Xhi and a second
// adds Xlo, giving an N-trit sum S and a carry c of 0, 1 or 2 (weight 3^N, i.e. 2c). Three N-trit
// adders form S+0, S+2 and S+4 in parallel and a TMUX steered by c picks one. Unlike the 3^N-1
// case this fold can overflow N trits once more (S+4 > 3^N-1); the carry out c2 of the selected
// adder is folded again as +2, which cannot overflow, and a comparator with subtractor brings
// the value from 0 .. 3^N-1 below the modulus. The 2*Xhi + Xlo sum and the carry-steered
// +0/+2/+4 selection follow the original architecture; the second fold and the final
// compare-subtract are this
// implementation's additions, needed for an exact residue.
// Purely combinational.
module trns_conv_m2
  import tvl_pkg::*;
#(
  parameter int N = 2
) (
  input  trit_t [N-1:0] x_hi,
  input  trit_t [N-1:0] x_lo,
  output trit_t [N-1:0] r,
  output trit_t         sel      // carry that steered the TMUX (observability)
);
  localparam tword_t MOD_T = to_tvl(modulus(N, 2));
  localparam trit_t [N-1:0] MODV = MOD_T[N-1:0];
  localparam tword_t K2_T = to_tvl(64'd2);
  localparam tword_t K4_T = to_tvl(64'd4);
  localparam trit_t [N-1:0] K2 = K2_T[N-1:0];   // constant 2
  localparam trit_t [N-1:0] K4 = K4_T[N-1:0];   // constant 4 = 11 (base 3)

  if (N < 2) begin : g_chk
    $error("trns_conv_m2 needs N >= 2");
  end

  trit_t [N-1:0] dbl, s, s0, s2, s4, t, u, diff;
  trit_t         cd, cl, c, c0, c2x, c4x, cy, cu_unused;
  logic          lt, bout_unused;

  // 2*Xhi + Xlo = c*3^N + S
  tvl_rca #(.W(N)) u_dbl (.a(x_hi), .b(x_hi), .cin(2'd0), .sum(dbl), .cout(cd));
  tvl_rca #(.W(N)) u_add (.a(dbl),  .b(x_lo), .cin(2'd0), .sum(s),   .cout(cl));
  assign c = trit_t'(cd + cl);

  // S + 2c: three adders, TMUX on c
  tvl_rca #(.W(N)) u_p0 (.a(s), .b('0), .cin(2'd0), .sum(s0), .cout(c0));
  tvl_rca #(.W(N)) u_p2 (.a(s), .b(K2), .cin(2'd0), .sum(s2), .cout(c2x));
  tvl_rca #(.W(N)) u_p4 (.a(s), .b(K4), .cin(2'd0), .sum(s4), .cout(c4x));

  always_comb begin
    unique case (c)
      2'd1:    begin t = s2; cy = c2x; end
      2'd2:    begin t = s4; cy = c4x; end
      default: begin t = s0; cy = c0;  end
    endcase
  end
  assign sel = c;

  // second fold: +2 when the selected adder overflowed
  tvl_rca #(.W(N)) u_fold (.a(t), .b('0), .cin((cy != 2'd0) ? 2'd2 : 2'd0), .sum(u), .cout(cu_unused));

  // u < 3^N: bring it below the modulus
  tvl_lt  #(.W(N)) u_cmp (.a(u), .b(MODV), .lt(lt));
  tvl_sub #(.W(N)) u_sub (.a(u), .b(MODV), .diff(diff), .bout(bout_unused));
  assign r = lt ? u : diff;
endmodule
