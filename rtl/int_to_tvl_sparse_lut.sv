// int_to_tvl_sparse_lut - integer to ternary conversion (LUT-1 / LUT-4) holding only the
// operands the DBTNS multiplier can use.
//
// The filter multiplies only operands of the form 2^i * 3^j (i, j in 0 .. 3^IDX_N-1) and zero.
// For 1-trit indices a full table over every integer code is small (64 entries), but for
// 2-trit indices the largest operand 2^8*3^8 = 1679616 needs 21 input bits, and a full table
// would have 2^21 entries; for 3-trit indices 2^26*3^26 needs 68 bits. This table therefore
// stores one entry per usable operand: its integer key and its XT-trit ternary image,
// (3^IDX_N)^2 entries plus zero. A key is 3^j shifted left i bits and an image is 2^i in ternary
// shifted up j trits, so no value wider than 64 bits is formed as one integer. All keys are compared with
// the input at once and the matching entry supplies the ternary word. An integer that is not a
// usable operand yields the all-2s word 3^XT-1. For XT >= 3 that word is never of the form
// 2^i*3^j: it is not divisible by 3, and 3^XT-1 = 2^i holds only for XT = 1 and 2. So the
// following ternary-to-DBTNS table reports it as a miss, as it would any other unusable operand.
// Purely combinational, like the full table. The table look-up follows the original
// architecture; storing only the usable operands is this implementation's choice for large
// index lengths.
module int_to_tvl_sparse_lut
  import tvl_pkg::*;
#(
  parameter int IDX_N = 2,                          // index trit length
  parameter int XB    = opnd_bits(IDX_N),           // integer input width
  parameter int XT    = opnd_trits(IDX_N)           // ternary output width
) (
  input  logic [XB-1:0]  x_int,
  output trit_t [XT-1:0] x_tvl
);
  localparam int NI = idx_max(IDX_N) + 1;   // values per index
  localparam int NE = NI * NI;              // stored operands besides zero

  if (XT < 3) begin : g_xt_check
    $error("int_to_tvl_sparse_lut: XT must be at least 3");
  end

  trit_t [XT-1:0] val [NE];
  logic  [NE-1:0] hit;

  for (genvar ii = 0; ii < NI; ii++) begin : g_i
    for (genvar jj = 0; jj < NI; jj++) begin : g_j
      localparam logic [XB-1:0] K = XB'(pow3(jj)) << ii;
      localparam tword_t T = dbtns_tvl(ii, jj);
      assign val[ii*NI+jj] = T[XT-1:0];
      assign hit[ii*NI+jj] = (x_int == K);
    end
  end

  always_comb begin
    x_tvl = {XT{2'd2}};
    if (x_int == '0) x_tvl = '0;
    for (int e = 0; e < NE; e++)
      if (hit[e]) x_tvl = val[e];
  end
endmodule
