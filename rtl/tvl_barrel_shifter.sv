// tvl_barrel_shifter - multi-trit left shift in a single pass: y = d * 3^s.
//
// The shift amount s is an SW-trit ternary number. Stage t looks at trit s[t] and shifts the
// word by 0, 3^t or 2*3^t trit positions through a three-way multiplexer, so SW stages cover
// every amount. Trits shifted in are 0; the output is wide enough (W_OUT = W_IN + largest
// amount) that nothing is lost for amounts up to SMAX. Purely combinational.
// The single-cycle multi-trit shift follows the original architecture; the logarithmic stage
// structure with
// base-3 stages is this implementation's choice.
module tvl_barrel_shifter
  import tvl_pkg::*;
#(
  parameter int W_IN  = 3,
  parameter int SW    = 2,
  parameter int SMAX  = 4,
  parameter int W_OUT = W_IN + SMAX
) (
  input  trit_t [W_IN-1:0]  d,
  input  trit_t [SW-1:0]    s,
  output trit_t [W_OUT-1:0] y
);
  trit_t [W_OUT-1:0] stage [SW+1];

  assign stage[0] = {{(W_OUT - W_IN){2'd0}}, d};
  for (genvar t = 0; t < SW; t++) begin : g_stage
    localparam int STEP = int'(pow3(t));
    // Three-way trit multiplexer on shift trit s[t]: 0, 3^t or 2*3^t positions.
    assign stage[t+1] = (s[t] == 2'd2) ? stage[t] << (4 * STEP) :
                        (s[t] == 2'd1) ? stage[t] << (2 * STEP) : stage[t];
  end
  assign y = stage[SW];
endmodule
