// tb_fir_idx23 - the 8-tap filter configurations of the synthesis table with 2-trit and 3-trit
// indices, each with moduli {7, 8, 9}, {25, 26, 27} and {79, 80, 81}: six filters.
// Operands are 0 and 2^i*3^j with i, j in 0..8 (2-trit indices, up to 2^8*3^8 = 1679616:
// 21-bit integers, 14 trits, 27-trit products) or i, j in 0..26 (3-trit indices, up to
// 2^26*3^26: 68-bit integers, 43 trits, 85-trit products). Each group of three filters shares
// its coefficient loads and sample stream. For 60 samples each y_int must equal
// (sum_k x(n-k)*h(k)) mod M of its moduli set (M = 504, 17550, 511920), computed here with
// 160-bit integers, and y_valid must come TAPS+1 = 9 cycles after start. The residue converters
// run their full chains of 2N-trit folds, and the sums exceed every dynamic range. One sample
// (5) has no 2^i*3^j form: the reduced integer-to-ternary table maps it to a word the DBTNS
// table rejects, so it contributes nothing and raises dbtns_miss for the 8 outputs whose
// window holds it.
// Counted and required: sums beyond each dynamic range, every carry select of the mod 3^N-1
// and mod 3^N-2 converters of both {79, 80, 81} filters, and the miss.
module tb_fir_idx23;
  import tvl_pkg::*;
  localparam int TAPS = 8;
  localparam int W    = 160;               // reference arithmetic width
  int checks = 0, failures = 0;
  int overflow_runs [2][3], m1_sel [2][2], m2_sel [2][3], misses [2];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        coef_we = 0, start = 0;
  logic [2:0]  coef_addr = '0;
  logic [20:0] coef_b = '0;               // 2-trit group coefficient bus
  logic [67:0] coef_c = '0;               // 3-trit group coefficient bus

  logic [2:0]  pc    [2][3];
  logic [20:0] xb    [3];
  logic [67:0] xc    [3];
  logic        busy [2][3], y_valid [2][3], miss [2][3];
  logic [18:0] y_int [2][3];
  logic [8:0]  yb2, yc2;
  logic [14:0] yb3, yc3;

  logic [W-1:0] coef [2][TAPS];
  logic [W-1:0] hist [2][TAPS];           // hist[group][k] = x(n-k)

  // 2-trit indices: moduli {7, 8, 9}, {25, 26, 27}, {79, 80, 81}
  dbtns_trns_fir #(.IDX_N(2), .MOD_N(2)) u_b2 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_b), .start(start), .x_int(xb[0]), .pc(pc[0][0]),
    .busy(busy[0][0]), .y_valid(y_valid[0][0]), .y_int(yb2), .dbtns_miss(miss[0][0]));
  dbtns_trns_fir #(.IDX_N(2), .MOD_N(3)) u_b3 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_b), .start(start), .x_int(xb[1]), .pc(pc[0][1]),
    .busy(busy[0][1]), .y_valid(y_valid[0][1]), .y_int(yb3), .dbtns_miss(miss[0][1]));
  dbtns_trns_fir #(.IDX_N(2), .MOD_N(4)) u_b4 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_b), .start(start), .x_int(xb[2]), .pc(pc[0][2]),
    .busy(busy[0][2]), .y_valid(y_valid[0][2]), .y_int(y_int[0][2]), .dbtns_miss(miss[0][2]));
  // 3-trit indices: the same three moduli sets
  dbtns_trns_fir #(.IDX_N(3), .MOD_N(2)) u_c2 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_c), .start(start), .x_int(xc[0]), .pc(pc[1][0]),
    .busy(busy[1][0]), .y_valid(y_valid[1][0]), .y_int(yc2), .dbtns_miss(miss[1][0]));
  dbtns_trns_fir #(.IDX_N(3), .MOD_N(3)) u_c3 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_c), .start(start), .x_int(xc[1]), .pc(pc[1][1]),
    .busy(busy[1][1]), .y_valid(y_valid[1][1]), .y_int(yc3), .dbtns_miss(miss[1][1]));
  dbtns_trns_fir #(.IDX_N(3), .MOD_N(4)) u_c4 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we),
    .coef_addr(coef_addr), .coef_int(coef_c), .start(start), .x_int(xc[2]), .pc(pc[1][2]),
    .busy(busy[1][2]), .y_valid(y_valid[1][2]), .y_int(y_int[1][2]), .dbtns_miss(miss[1][2]));

  for (genvar g = 0; g < 3; g++) begin : g_src
    assign xb[g] = 21'(hist[0][pc[0][g]]);
    assign xc[g] = 68'(hist[1][pc[1][g]]);
  end
  assign y_int[0][0] = 19'(yb2);
  assign y_int[0][1] = 19'(yb3);
  assign y_int[1][0] = 19'(yc2);
  assign y_int[1][1] = 19'(yc3);

  // carry selects of every fold stage of the two {79, 80, 81} filters (8-trit folds: 6 stages
  // for 27-trit products, 21 for 85-trit products)
  for (genvar k = 0; k < 6; k++) begin : g_cnt_b
    always @(posedge clk) if (u_b4.acc_en) begin
      m1_sel[0][u_b4.u_mac.u_conv.g_fold[k].u_m1.sel != 0]++;
      m2_sel[0][u_b4.u_mac.u_conv.g_fold[k].u_m2.sel]++;
    end
  end
  for (genvar k = 0; k < 21; k++) begin : g_cnt_c
    always @(posedge clk) if (u_c4.acc_en) begin
      m1_sel[1][u_c4.u_mac.u_conv.g_fold[k].u_m1.sel != 0]++;
      m2_sel[1][u_c4.u_mac.u_conv.g_fold[k].u_m2.sel]++;
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // 0 or 2^i*3^j with i, j < 3^n
  function automatic logic [W-1:0] rand_operand(int n);
    if ($urandom_range(0, 9) == 0) return '0;
    return W'(pow3($urandom_range(0, int'(pow3(n)) - 1))) << $urandom_range(0, int'(pow3(n)) - 1);
  endfunction

  task automatic load_coefs();
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef[0][k] = rand_operand(2);
      coef[1][k] = rand_operand(3);
      coef_we    = 1;
      coef_addr  = 3'(k);
      coef_b     = 21'(coef[0][k]);
      coef_c     = 68'(coef[1][k]);
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [W-1:0] mm [3] = '{W'(504), W'(17550), W'(511920)};
    for (int q = 0; q < 2; q++)
      for (int k = 0; k < TAPS; k++) hist[q][k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int n = 0; n < 60; n++) begin
      automatic logic [W-1:0] sum [2] = '{default: '0};
      automatic int lat = 1;
      if (n == 30) load_coefs();
      for (int q = 0; q < 2; q++) begin
        for (int k = TAPS - 1; k > 0; k--) hist[q][k] = hist[q][k-1];
        hist[q][0] = (n == 15) ? W'(5) : rand_operand(q + 2);
        for (int k = 0; k < TAPS; k++)
          if (hist[q][k] != W'(5)) sum[q] += hist[q][k] * coef[q][k];
        for (int g = 0; g < 3; g++) if (sum[q] >= mm[g]) overflow_runs[q][g]++;
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (lat < 20) begin
        for (int q = 0; q < 2; q++)
          for (int g = 0; g < 3; g++)
            if (y_valid[q][g]) begin
              check(lat == TAPS + 1, $sformatf("idx %0d inst %0d sample %0d latency %0d", q + 2, g, n, lat));
              check(W'(y_int[q][g]) == sum[q] % mm[g],
                    $sformatf("idx %0d inst %0d sample %0d y=%0d expected %0d", q + 2, g, n,
                              y_int[q][g], sum[q] % mm[g]));
              check(miss[q][g] == (n >= 15 && n < 15 + TAPS),
                    $sformatf("idx %0d inst %0d sample %0d miss flag %0d", q + 2, g, n, miss[q][g]));
              if (g == 0 && miss[q][g]) misses[q]++;
            end
        @(negedge clk);
        lat++;
      end
    end
    for (int q = 0; q < 2; q++) begin
      $display("%0d-trit indices: sums above M: %0d %0d %0d; {79, 80, 81} m1 selects 0/other %0d/%0d, m2 selects %0d %0d %0d; misses %0d",
               q + 2, overflow_runs[q][0], overflow_runs[q][1], overflow_runs[q][2],
               m1_sel[q][0], m1_sel[q][1], m2_sel[q][0], m2_sel[q][1], m2_sel[q][2], misses[q]);
      check(overflow_runs[q][0] > 0 && overflow_runs[q][1] > 0 && overflow_runs[q][2] > 0,
            "dynamic range of every moduli set exceeded");
      check(m1_sel[q][1] > 0, "mod 3^N-1 carry select");
      check(m2_sel[q][1] > 0 && m2_sel[q][2] > 0, "mod 3^N-2 carry selects 1 and 2");
      check(misses[q] > 0, "miss");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
