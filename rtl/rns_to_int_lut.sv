// rns_to_int_lut - residues {r2, r1, r0} for moduli {3^N-2, 3^N-1, 3^N} to the integer
// y in 0 .. M-1, M = (3^N-2)(3^N-1)3^N (LUT-5 of the FIR datapath).
//
// Chinese-remainder reconstruction with tables: for each modulus a table addressed by the raw
// trit code of its residue (4^N locations) holds r * Mi * (Mi^-1 mod mi) mod M, computed at
// elaboration; two binary modular adders sum the three table outputs modulo M. For N = 4
// (moduli 79, 80, 81) the tables have 256 entries and y is 19 bits (M = 511920).
// Purely combinational. That the residue-to-integer step is a table look-up follows the
// original architecture;
// splitting it into three per-modulus CRT tables instead of one table of M entries is this
// implementation's choice.
module rns_to_int_lut
  import tvl_pkg::*;
#(
  parameter int N  = 4,
  parameter int YB = bits_for(dyn_range(N) - 1)
) (
  input  trit_t [N-1:0] r0,   // mod 3^N
  input  trit_t [N-1:0] r1,   // mod 3^N-1
  input  trit_t [N-1:0] r2,   // mod 3^N-2
  output logic [YB-1:0] y
);
  localparam int              AW    = 2 * N;
  localparam int              DEPTH = 1 << AW;
  localparam longint unsigned MM    = dyn_range(N);

  // Value of a raw trit code (codes 3 read as 0; they never occur).
  function automatic longint unsigned code_value(longint unsigned adr);
    longint unsigned v = 0;
    for (int t = N - 1; t >= 0; t--) begin
      longint unsigned d;
      d = (adr >> (2 * t)) & 64'd3;
      v = v * 3 + ((d == 3) ? 64'd0 : d);
    end
    return v;
  endfunction

  logic [YB-1:0] lut0 [DEPTH];
  logic [YB-1:0] lut1 [DEPTH];
  logic [YB-1:0] lut2 [DEPTH];

  for (genvar a = 0; a < DEPTH; a++) begin : g_rom
    localparam longint unsigned V = code_value(longint'(a));
    assign lut0[a] = YB'(crt_term(N, 0, V));
    assign lut1[a] = YB'(crt_term(N, 1, V));
    assign lut2[a] = YB'(crt_term(N, 2, V));
  end

  function automatic logic [YB-1:0] add_mod(logic [YB-1:0] p, logic [YB-1:0] q);
    logic [YB:0] s;
    s = {1'b0, p} + {1'b0, q};
    if (s >= (YB + 1)'(MM)) s = s - (YB + 1)'(MM);
    return s[YB-1:0];
  endfunction

  assign y = add_mod(add_mod(lut0[r0], lut1[r1]), lut2[r2]);
endmodule
