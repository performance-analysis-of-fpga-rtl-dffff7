// dbtns_conv - ternary number to double-base ternary (DBTNS) indices (LUT-2 for x(n), LUT-3
// for h(n)).
//
// An operand of the form X = 2^i * 3^j is mapped to its index pair (i, j), each an IDX_N-trit
// ternary number (0 .. 3^IDX_N-1). The table holds, for every (i, j) pair, the ternary value
// 2^i*3^j (the DBTNS table: for IDX_N = 1 the nine values 1, 3, 9, 2, 6, 18, 4, 12, 36). All
// entries are compared with the input at once and the matching location supplies (i, j); since
// 2^i*3^j is unique for each pair, at most one entry matches.
//   zero : X = 0, which has no single-term 2^i*3^j form; the MAC treats it as a zero product.
//   miss : X is neither zero nor of the form 2^i*3^j; i and j are then 0.
// Purely combinational. The table contents and the (i, j) index format follow the original
// architecture; the parallel match, the zero flag and the miss flag are this implementation's
// choices, since the original only says that i and j are read from the table.
module dbtns_conv
  import tvl_pkg::*;
#(
  parameter int IDX_N = 1,                        // trits per index
  parameter int XT    = opnd_trits(IDX_N)          // trits of the operand
) (
  input  trit_t [XT-1:0]    x,
  output trit_t [IDX_N-1:0] i,
  output trit_t [IDX_N-1:0] j,
  output logic              zero,
  output logic              miss
);
  localparam int NI = idx_max(IDX_N) + 1;   // values per index

  trit_t [XT-1:0] table_val [NI][NI];
  logic  [NI-1:0] hit_row [NI];

  for (genvar ii = 0; ii < NI; ii++) begin : g_i
    for (genvar jj = 0; jj < NI; jj++) begin : g_j
      localparam tword_t V = dbtns_tvl(ii, jj);
      assign table_val[ii][jj] = V[XT-1:0];
      assign hit_row[ii][jj]   = (x == table_val[ii][jj]);
    end
  end

  // index value to IDX_N trits
  function automatic trit_t [IDX_N-1:0] idx_tvl(int v);
    trit_t [IDX_N-1:0] t;
    for (int k = 0; k < IDX_N; k++) begin
      t[k] = trit_t'(v % 3);
      v    = v / 3;
    end
    return t;
  endfunction

  always_comb begin
    int   ti, tj;
    logic any;
    ti  = 0;
    tj  = 0;
    any = 1'b0;
    for (int ii = 0; ii < NI; ii++) begin
      for (int jj = 0; jj < NI; jj++) begin
        if (hit_row[ii][jj]) begin
          ti  = ii;
          tj  = jj;
          any = 1'b1;
        end
      end
    end
    i    = idx_tvl(ti);
    j    = idx_tvl(tj);
    zero = (x == '0);
    miss = !any && !zero;
  end
endmodule
