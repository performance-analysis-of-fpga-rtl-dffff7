// trns_adder - carry-free modular (TRNS) adder for one modulus MODV < 3^N:
//   sum = a + b        if a + b < MODV
//       = a + b - MODV otherwise.
//
// An N-trit ternary ripple carry adder forms the (N+1)-trit sum; a logic comparator tests it
// against the modulus; a demultiplexer routes the sum either straight to the output multiplexer
// or into a ternary subtractor that removes the modulus; the comparator also steers the output
// multiplexer. Both inputs must already be below the modulus; the output then is too.
// `wrap` reports that the subtract path was taken. Purely combinational. The structure follows
// the original architecture.
module trns_adder
  import tvl_pkg::*;
#(
  parameter int              N    = 4,
  parameter longint unsigned MODV = 81
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  output trit_t [N-1:0] sum,
  output logic          wrap
);
  localparam tword_t MOD_T = to_tvl(MODV);
  localparam trit_t [N:0] MODW = MOD_T[N:0];

  trit_t [N-1:0] s_lo;
  trit_t         s_c;
  trit_t [N:0]   s, pass_path, sub_path, diff;
  logic          lt, bout_unused;

  tvl_rca #(.W(N))   u_add (.a(a), .b(b), .cin(2'd0), .sum(s_lo), .cout(s_c));
  assign s = {s_c, s_lo};

  tvl_lt  #(.W(N+1)) u_cmp (.a(s), .b(MODW), .lt(lt));

  // demultiplexer: the sum goes to one path, the other sees 0
  assign pass_path = lt ? s  : '0;
  assign sub_path  = lt ? '0 : s;

  tvl_sub #(.W(N+1)) u_sub (.a(sub_path), .b(MODW), .diff(diff), .bout(bout_unused));

  // output multiplexer
  assign sum  = lt ? pass_path[N-1:0] : diff[N-1:0];
  assign wrap = !lt;
endmodule
