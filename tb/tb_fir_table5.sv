// tb_fir_table5 - the filter configurations of the synthesis table that have 1-trit indices:
// 8 taps with moduli {7, 8, 9}, {25, 26, 27} and {79, 80, 81}, and the 4-tap filter used to
// describe the operation. All four instances share coefficient loads and the sample stream; for
// 60 samples each y_int must equal (sum_k x(n-k)*h(k)) mod M of its moduli set (M = 504, 17550,
// 511920), and y_valid must come TAPS+1 cycles after start. With moduli {7, 8, 9} the sums exceed
// the dynamic range, and with the two smaller sets the mod 3^N-2 converters take carry select 1;
// both are counted and must occur. The other carry selects are reported only: products of two
// 2^i*3^j values up to 36 are sparse in ternary and rarely or never reach them (the converter
// tests cover them exhaustively).
module tb_fir_table5;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  int overflow_runs = 0, sel_m1 [2], sel_m2 [2][3];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       coef_we = 0, start = 0;
  logic [2:0] coef_addr = '0;
  logic [5:0] coef_int = '0;

  logic [2:0]  pc    [4];
  logic [5:0]  x_int [4];
  logic        busy [4], y_valid [4], miss [4];
  logic [18:0] y_int [4];
  logic [8:0]  y2;
  logic [14:0] y3;
  logic [18:0] y4, y4t;

  int coef [8];
  int hist [8];

  // 8 taps, moduli 7, 8, 9
  dbtns_trns_fir #(.MOD_N(2)) u_m2 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_int(coef_int), .start(start), .x_int(x_int[0]), .pc(pc[0]), .busy(busy[0]),
    .y_valid(y_valid[0]), .y_int(y2), .dbtns_miss(miss[0]));
  // 8 taps, moduli 25, 26, 27
  dbtns_trns_fir #(.MOD_N(3)) u_m3 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_int(coef_int), .start(start), .x_int(x_int[1]), .pc(pc[1]), .busy(busy[1]),
    .y_valid(y_valid[1]), .y_int(y3), .dbtns_miss(miss[1]));
  // 8 taps, moduli 79, 80, 81
  dbtns_trns_fir #(.MOD_N(4)) u_m4 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_int(coef_int), .start(start), .x_int(x_int[2]), .pc(pc[2]), .busy(busy[2]),
    .y_valid(y_valid[2]), .y_int(y4), .dbtns_miss(miss[2]));
  // 4 taps, moduli 79, 80, 81 (coefficients 0..3 of the same table)
  dbtns_trns_fir #(.MOD_N(4), .TAPS(4)) u_t4 (.clk(clk), .rst_n(rst_n), .coef_we(coef_we && !coef_addr[2]),
    .coef_addr(coef_addr[1:0]), .coef_int(coef_int), .start(start), .x_int(x_int[3]), .pc(pc[3][1:0]),
    .busy(busy[3]), .y_valid(y_valid[3]), .y_int(y4t), .dbtns_miss(miss[3]));
  assign pc[3][2] = 1'b0;

  for (genvar g = 0; g < 4; g++) begin : g_src
    assign x_int[g] = 6'(hist[pc[g]]);
  end
  assign y_int[0] = 19'(y2);
  assign y_int[1] = 19'(y3);
  assign y_int[2] = y4;
  assign y_int[3] = y4t;

  // carry selects of every stage of the chained residue converters (3 stages for 7-trit products
  // with N = 2, 2 stages with N = 3)
  for (genvar k = 0; k < 3; k++) begin : g_cnt2
    always @(posedge clk) if (u_m2.acc_en) begin
      sel_m1[0] += int'(u_m2.u_mac.u_conv.g_fold[k].u_m1.sel != 0);
      sel_m2[0][u_m2.u_mac.u_conv.g_fold[k].u_m2.sel]++;
    end
  end
  for (genvar k = 0; k < 2; k++) begin : g_cnt3
    always @(posedge clk) if (u_m3.acc_en) begin
      sel_m1[1] += int'(u_m3.u_mac.u_conv.g_fold[k].u_m1.sel != 0);
      sel_m2[1][u_m3.u_mac.u_conv.g_fold[k].u_m2.sel]++;
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int rand_operand();
    if ($urandom_range(0, 9) == 0) return 0;
    return (1 << $urandom_range(0, 2)) * int'(pow3($urandom_range(0, 2)));
  endfunction

  task automatic load_coefs();
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      coef[k]   = rand_operand();
      coef_we   = 1;
      coef_addr = 3'(k);
      coef_int  = 6'(coef[k]);
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
    longint unsigned mm [4] = '{504, 17550, 511920, 511920};
    int taps [4] = '{8, 8, 8, 4};
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int n = 0; n < 60; n++) begin
      int lat;
      int sum [4];
      if (n == 30) load_coefs();
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = rand_operand();
      for (int g = 0; g < 4; g++) begin
        sum[g] = 0;
        for (int k = 0; k < taps[g]; k++) sum[g] += hist[k] * coef[k];
      end
      if (longint'(sum[0]) >= mm[0]) overflow_runs++;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (lat < 20) begin
        for (int g = 0; g < 4; g++)
          if (y_valid[g]) begin
            check(lat == taps[g] + 1, $sformatf("inst %0d sample %0d latency %0d", g, n, lat));
            check(longint'(y_int[g]) == longint'(sum[g]) % mm[g],
                  $sformatf("inst %0d sample %0d y=%0d expected %0d", g, n, y_int[g], longint'(sum[g]) % mm[g]));
          end
        @(negedge clk);
        lat++;
      end
    end
    $display("sums above 504: %0d; m1 selects %0d %0d; m2 selects {7}: %0d %0d %0d {25}: %0d %0d %0d",
             overflow_runs, sel_m1[0], sel_m1[1], sel_m2[0][0], sel_m2[0][1], sel_m2[0][2],
             sel_m2[1][0], sel_m2[1][1], sel_m2[1][2]);
    check(overflow_runs > 0, "dynamic range of {7, 8, 9} exceeded");
    check(sel_m2[0][1] > 0 && sel_m2[1][1] > 0, "mod 3^N-2 carry select 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
