// pow2_lut - table of 2^k in ternary, addressed by the ternary index sum k = i1 + i2.
//
// The address is the (IDX_N+1)-trit sum from the index adder, used directly as a binary
// address (two bits per trit), so the table has 4^(IDX_N+1) locations of which the legal
// ternary codes 0 .. 2*(3^IDX_N-1) are filled with 2^k written in N trits; the others hold 0.
// N is 3, 11, 33 trits for IDX_N = 1, 2, 3. Purely combinational. Storing powers of two in a
// table follows the original architecture; addressing it by the raw trit code is this
// implementation's choice.
module pow2_lut
  import tvl_pkg::*;
#(
  parameter int IDX_N = 1,
  parameter int N     = pow2_trits(IDX_N)
) (
  input  trit_t [IDX_N:0] k,
  output trit_t [N-1:0]   p
);
  localparam int AW    = 2 * (IDX_N + 1);
  localparam int DEPTH = 1 << AW;
  localparam int KMAX  = 2 * idx_max(IDX_N);

  trit_t [N-1:0] rom [DEPTH];

  // Ternary value of a raw address, or -1 if one of its trit codes is 3.
  function automatic longint code_value(longint adr);
    longint v = 0;
    for (int t = IDX_N; t >= 0; t--) begin
      if (((adr >> (2 * t)) & 3) == 3) return -1;
      v = v * 3 + ((adr >> (2 * t)) & 64'd3);
    end
    return v;
  endfunction

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam longint KV = code_value(longint'(a));
    localparam tword_t T  = (KV >= 0 && KV <= longint'(KMAX)) ? to_tvl(64'd1 << KV) : '0;
    assign rom[a] = T[N-1:0];
  end

  assign p = rom[k];
endmodule
