// trns_conv - ternary residue (TRNS) conversion of the product X into {Xm2, Xm1, Xm0} for the
// moduli set {3^N-2, 3^N-1, 3^N}.
//
// Xm0 (modulus 3^N) is just the N least significant trits of X. Xm1 and Xm2 come from the
// 2N-trit converters trns_conv_m1 / trns_conv_m2. A 2N-trit input needs one converter each;
// a product longer than 2N trits (e.g. 27 trits for 2-trit indices) is cut into N-trit chunks
// C(K-1) .. C(0) and reduced Horner-fashion, r = conv({r, C(k)}), through a chain of K-1
// converters, since r*3^N + C(k) is exactly a 2N-trit number. With the default sizes (7-trit
// product, N = 4) there is one converter per modulus, as in the original architecture. The
// chaining for
// longer products is this implementation's generalisation.
// Purely combinational.
module trns_conv
  import tvl_pkg::*;
#(
  parameter int N  = 4,     // modulus trit length
  parameter int PT = 7      // product trit length
) (
  input  trit_t [PT-1:0] x,
  output trit_t [N-1:0]  xm0,  // mod 3^N
  output trit_t [N-1:0]  xm1,  // mod 3^N-1
  output trit_t [N-1:0]  xm2   // mod 3^N-2
);
  localparam int KC = (PT + N - 1) / N;
  localparam int K  = (KC < 2) ? 2 : KC;        // number of N-trit chunks

  trit_t [K*N-1:0] xp;
  assign xp = {{(K * N - PT){2'd0}}, x};

  assign xm0 = xp[N-1:0];

  trit_t [N-1:0] r1 [K];
  trit_t [N-1:0] r2 [K];
  assign r1[K-1] = xp[(K-1)*N +: N];
  assign r2[K-1] = xp[(K-1)*N +: N];

  for (genvar k = 0; k < K - 1; k++) begin : g_fold
    trit_t sel1_unused, sel2_unused;
    trns_conv_m1 #(.N(N)) u_m1 (.x_hi(r1[k+1]), .x_lo(xp[k*N +: N]), .r(r1[k]), .sel(sel1_unused));
    trns_conv_m2 #(.N(N)) u_m2 (.x_hi(r2[k+1]), .x_lo(xp[k*N +: N]), .r(r2[k]), .sel(sel2_unused));
  end

  assign xm1 = r1[0];
  assign xm2 = r2[0];
endmodule
