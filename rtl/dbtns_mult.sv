// dbtns_mult - double-base ternary (DBTNS) multiplier: Z = 2^(i1+i2) * 3^(j1+j2).
//
// With X1 = 2^i1*3^j1 and X2 = 2^i2*3^j2 the product needs no partial products: two IDX_N-trit
// ternary ripple carry adders form i1+i2 and j1+j2 (IDX_N+1 trits each), a table returns
// 2^(i1+i2) in N trits, and a ternary barrel shifter multiplies it by 3^(j1+j2), i.e. shifts it
// left by j1+j2 trits, giving the M-trit product.
//   IDX_N = 1: N = 3,  largest shift 4,  M = 7
//   IDX_N = 2: N = 11, largest shift 16, M = 27
//   IDX_N = 3: N = 33, largest shift 52, M = 85
// Purely combinational (adder, table, shifter in one cycle). Structure and trit lengths follow
// the original architecture.
module dbtns_mult
  import tvl_pkg::*;
#(
  parameter int IDX_N = 1,
  parameter int N     = pow2_trits(IDX_N),
  parameter int M     = prod_trits(IDX_N)
) (
  input  trit_t [IDX_N-1:0] i1,
  input  trit_t [IDX_N-1:0] j1,
  input  trit_t [IDX_N-1:0] i2,
  input  trit_t [IDX_N-1:0] j2,
  output trit_t [M-1:0]     product
);
  trit_t [IDX_N-1:0] isum_lo, jsum_lo;
  trit_t             isum_c, jsum_c;
  trit_t [N-1:0]     p2;

  tvl_rca #(.W(IDX_N)) u_iadd (.a(i1), .b(i2), .cin(2'd0), .sum(isum_lo), .cout(isum_c));
  tvl_rca #(.W(IDX_N)) u_jadd (.a(j1), .b(j2), .cin(2'd0), .sum(jsum_lo), .cout(jsum_c));

  pow2_lut #(.IDX_N(IDX_N), .N(N)) u_lut (.k({isum_c, isum_lo}), .p(p2));

  tvl_barrel_shifter #(
    .W_IN (N),
    .SW   (IDX_N + 1),
    .SMAX (2 * idx_max(IDX_N)),
    .W_OUT(M)
  ) u_shift (
    .d(p2),
    .s({jsum_c, jsum_lo}),
    .y(product)
  );
endmodule
