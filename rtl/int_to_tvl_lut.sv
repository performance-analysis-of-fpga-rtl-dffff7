// int_to_tvl_lut - integer to ternary conversion by look-up table (LUT-1 for x(n), LUT-4
// for h(n)).
//
// The table has one entry per XB-bit input code; entry v holds the XT-trit ternary image of v.
// Its contents are the formula to_tvl(v) (repeated division by 3), evaluated at elaboration,
// so the table is a constant ROM. Purely combinational: the ternary word is valid one table
// access after the integer. That the conversion is a pure table look-up follows the original
// architecture;
// the sizing (XB bits in, enough trits for 2^XB-1 out) is this implementation's choice.
module int_to_tvl_lut
  import tvl_pkg::*;
#(
  parameter int XB = 6,                           // integer input width
  parameter int XT = trits_for((64'd1 << XB) - 1) // ternary output width
) (
  input  logic [XB-1:0] x_int,
  output trit_t [XT-1:0] x_tvl
);
  localparam int DEPTH = 1 << XB;

  trit_t [XT-1:0] rom [DEPTH];

  for (genvar v = 0; v < DEPTH; v++) begin : g_rom
    localparam tword_t T = to_tvl(longint'(v));
    assign rom[v] = T[XT-1:0];
  end

  assign x_tvl = rom[x_int];
endmodule
