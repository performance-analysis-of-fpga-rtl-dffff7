// dbtns_trns_fir - FIR filter y(n) = sum_{k=0}^{TAPS-1} x(n-k) * h(k) on one DBTNS-TRNS
// mixed-base MAC unit.
//
// Datapath (integer in, integer out, ternary inside):
//   coef_int -> LUT-4 (integer to ternary) -> coefficient table, written before a run
//   x_int    -> LUT-1 (integer to ternary) -> MAC operand x
//   coefficient table[pc]                  -> MAC operand h
//   MAC: LUT-2/LUT-3 (ternary to 2^i*3^j indices), DBTNS multiplier, residue conversion,
//        three modular adders, ternary register TReg
//   TReg -> LUT-5 (residues to integer) -> y_int
// Operation: `start` clears TReg and starts the program counter at 0. For TAPS cycles the
// program counter `pc` addresses h(pc); the sample source must drive x_int = x(n-pc) in the same
// cycle (combinationally from pc). One product is accumulated per clock. In cycle TAPS+1 after
// start, y_valid is high for one cycle and y_int = y(n) mod M, M = (3^N-2)(3^N-1)3^N (511920 for
// the default N = 4, which exceeds the largest 8-tap sum 8*36*36 = 10368, so the result is exact
// there). dbtns_miss is set if any operand of the run was neither 0 nor a 2^i*3^j value, and
// cleared by the next start.
// LUT-1 and LUT-4 are full tables over every XB-bit integer while that is small (up to 12 bits,
// which covers 1-trit indices). Beyond that (2-trit indices need 21 bits, 3-trit indices 68)
// they hold only zero and the 2^i*3^j operands; any other integer then also raises dbtns_miss.
// Defaults: 1-trit indices (operands 2^i*3^j with i, j in 0..2, up to 36), moduli {79, 80, 81},
// 8 taps, as in the configuration reported for the original architecture. The integer widths,
// the start/y_valid
// handshake and the miss flag are this implementation's.
module dbtns_trns_fir
  import tvl_pkg::*;
#(
  parameter int IDX_N = 1,                          // index trit length
  parameter int MOD_N = 4,                          // modulus trit length
  parameter int TAPS  = 8,                          // filter taps
  parameter int XB    = opnd_bits(IDX_N),           // integer operand width
  parameter int XT    = (XB > 12) ? opnd_trits(IDX_N) : trits_for((64'd1 << XB) - 1),
  parameter int YB    = bits_for(dyn_range(MOD_N) - 1),
  parameter int PCW   = (TAPS > 1) ? $clog2(TAPS) : 1,
  parameter bit SPARSE_LUT = (XB > 12)              // LUT-1/LUT-4 hold only usable operands
) (
  input  logic           clk,
  input  logic           rst_n,
  // coefficient load
  input  logic           coef_we,
  input  logic [PCW-1:0] coef_addr,
  input  logic [XB-1:0]  coef_int,
  // filter run
  input  logic           start,
  input  logic [XB-1:0]  x_int,
  output logic [PCW-1:0] pc,
  output logic           busy,
  output logic           y_valid,
  output logic [YB-1:0]  y_int,
  output logic           dbtns_miss
);
  trit_t [XT-1:0]    coef_tvl, h_tvl, x_tvl;
  trit_t [MOD_N-1:0] acc0, acc1, acc2;
  logic              clr, acc_en, miss;

  if (SPARSE_LUT) begin : g_sparse
    int_to_tvl_sparse_lut #(.IDX_N(IDX_N), .XB(XB), .XT(XT)) u_lut4 (.x_int(coef_int), .x_tvl(coef_tvl));
    int_to_tvl_sparse_lut #(.IDX_N(IDX_N), .XB(XB), .XT(XT)) u_lut1 (.x_int(x_int),    .x_tvl(x_tvl));
  end else begin : g_full
    int_to_tvl_lut #(.XB(XB), .XT(XT)) u_lut4 (.x_int(coef_int), .x_tvl(coef_tvl));
    int_to_tvl_lut #(.XB(XB), .XT(XT)) u_lut1 (.x_int(x_int),    .x_tvl(x_tvl));
  end

  coef_lut #(.TAPS(TAPS), .XT(XT), .AW(PCW)) u_coef (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(coef_tvl),
    .raddr(pc),
    .rdata(h_tvl)
  );

  fir_ctrl #(.TAPS(TAPS), .PCW(PCW)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .pc     (pc),
    .clr    (clr),
    .acc_en (acc_en),
    .y_valid(y_valid),
    .busy   (busy)
  );

  mac_unit #(.IDX_N(IDX_N), .N(MOD_N), .XT(XT)) u_mac (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .acc_en(acc_en),
    .x     (x_tvl),
    .h     (h_tvl),
    .acc0  (acc0),
    .acc1  (acc1),
    .acc2  (acc2),
    .miss  (miss)
  );

  rns_to_int_lut #(.N(MOD_N), .YB(YB)) u_lut5 (.r0(acc0), .r1(acc1), .r2(acc2), .y(y_int));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 dbtns_miss <= 1'b0;
    else if (clr)               dbtns_miss <= 1'b0;
    else if (acc_en && miss)    dbtns_miss <= 1'b1;
  end
endmodule
