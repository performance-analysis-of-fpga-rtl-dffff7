// mac_unit - DBTNS-TRNS mixed-base multiply-accumulate unit.
//
// One multiply-accumulate per clock:
//   1. Both ternary operands x and h are turned into double-base indices (i, j), with
//      operand = 2^i * 3^j (dbtns_conv, one table per operand).
//   2. The DBTNS multiplier adds the indices, looks up 2^(i1+i2) and shifts it by j1+j2 trits:
//      a PT-trit ternary product without partial products.
//   3. The product is converted to residues modulo {3^N-2, 3^N-1, 3^N} (trns_conv).
//   4. Three carry-free modular adders add the residues to those held in the ternary register
//      TReg, which is loaded with the sums on the clock edge when acc_en is high.
// `clr` zeroes TReg (start of a new sum). The accumulated value is (sum of products) mod M,
// M = (3^N-2)(3^N-1)3^N. A zero operand, or one that has no 2^i*3^j form (`miss`), contributes
// a zero product; `miss` is combinational for the current operands.
// Steps 1-4 follow the original architecture. The zero-operand rule and the miss flag are this
// implementation's, because a single double-base term cannot express 0 or a general integer.
module mac_unit
  import tvl_pkg::*;
#(
  parameter int IDX_N = 1,                          // index trit length
  parameter int N     = 4,                          // modulus trit length
  parameter int XT    = opnd_trits(IDX_N), // operand trit length
  parameter int PT    = prod_trits(IDX_N)           // product trit length
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           acc_en,
  input  trit_t [XT-1:0] x,
  input  trit_t [XT-1:0] h,
  output trit_t [N-1:0]  acc0,   // TReg residue mod 3^N
  output trit_t [N-1:0]  acc1,   // TReg residue mod 3^N-1
  output trit_t [N-1:0]  acc2,   // TReg residue mod 3^N-2
  output logic           miss
);
  trit_t [IDX_N-1:0] xi, xj, hi, hj;
  logic              x_zero, x_miss, h_zero, h_miss;
  trit_t [PT-1:0]    prod_raw, prod;
  trit_t [N-1:0]     p0, p1, p2, s0, s1, s2;
  logic              w0_unused, w1_unused, w2_unused;

  dbtns_conv #(.IDX_N(IDX_N), .XT(XT)) u_xconv (.x(x), .i(xi), .j(xj), .zero(x_zero), .miss(x_miss));
  dbtns_conv #(.IDX_N(IDX_N), .XT(XT)) u_hconv (.x(h), .i(hi), .j(hj), .zero(h_zero), .miss(h_miss));

  dbtns_mult #(.IDX_N(IDX_N), .M(PT)) u_mult (.i1(hi), .j1(hj), .i2(xi), .j2(xj), .product(prod_raw));

  assign miss = x_miss || h_miss;
  assign prod = (x_zero || h_zero || miss) ? '0 : prod_raw;

  trns_conv #(.N(N), .PT(PT)) u_conv (.x(prod), .xm0(p0), .xm1(p1), .xm2(p2));

  trns_adder #(.N(N), .MODV(modulus(N, 0))) u_add0 (.a(p0), .b(acc0), .sum(s0), .wrap(w0_unused));
  trns_adder #(.N(N), .MODV(modulus(N, 1))) u_add1 (.a(p1), .b(acc1), .sum(s1), .wrap(w1_unused));
  trns_adder #(.N(N), .MODV(modulus(N, 2))) u_add2 (.a(p2), .b(acc2), .sum(s2), .wrap(w2_unused));

  treg #(.W(3 * N)) u_treg (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (acc_en),
    .d    ({s2, s1, s0}),
    .q    ({acc2, acc1, acc0})
  );
endmodule
