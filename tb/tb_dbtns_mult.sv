// tb_dbtns_mult - DBTNS multiplier.
// 1-trit indices: all 81 index combinations, product == 2^(i1+i2)*3^(j1+j2), in 7 trits.
// 2-trit indices: 3000 random combinations, 27-trit product.
// The trit lengths N and M of both instances, and the package's sizing for 3-trit indices, are
// checked against the multiplier data table (N = 3, 11, 33; M = 7, 27, 85).
module tb_dbtns_mult;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [0:0]  a_i1, a_j1, a_i2, a_j2;
  trit_t [6:0]  a_p;
  trit_t [1:0]  b_i1, b_j1, b_i2, b_j2;
  trit_t [26:0] b_p;

  dbtns_mult #(.IDX_N(1)) dut1 (.i1(a_i1), .j1(a_j1), .i2(a_i2), .j2(a_j2), .product(a_p));
  dbtns_mult #(.IDX_N(2)) dut2 (.i1(b_i1), .j1(b_j1), .i2(b_i2), .j2(b_j2), .product(b_p));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut1.N == 3 && dut1.M == 7, "n=1 sizes");
    check(dut2.N == 11 && dut2.M == 27, "n=2 sizes");
    check(pow2_trits(3) == 33 && prod_trits(3) == 85, "n=3 sizes");
    for (int c = 0; c < 81; c++) begin
      automatic tword_t tp = '0;
      a_i1 = trit_t'(c % 3); a_j1 = trit_t'((c / 3) % 3);
      a_i2 = trit_t'((c / 9) % 3); a_j2 = trit_t'(c / 27);
      #1;
      tp[6:0] = a_p;
      check(from_tvl(tp) == (64'd1 << (int'(a_i1[0]) + int'(a_i2[0]))) * pow3(int'(a_j1[0]) + int'(a_j2[0])),
            $sformatf("n=1 %0d %0d %0d %0d -> %0d", a_i1[0], a_j1[0], a_i2[0], a_j2[0], from_tvl(tp)));
    end
    for (int n = 0; n < 3000; n++) begin
      automatic int ii1 = $urandom_range(0, 8), jj1 = $urandom_range(0, 8);
      automatic int ii2 = $urandom_range(0, 8), jj2 = $urandom_range(0, 8);
      tword_t t, tp = '0;
      t = to_tvl(longint'(ii1)); b_i1 = t[1:0];
      t = to_tvl(longint'(jj1)); b_j1 = t[1:0];
      t = to_tvl(longint'(ii2)); b_i2 = t[1:0];
      t = to_tvl(longint'(jj2)); b_j2 = t[1:0];
      #1;
      tp[26:0] = b_p;
      check(from_tvl(tp) == (64'd1 << (ii1 + ii2)) * pow3(jj1 + jj2),
            $sformatf("n=2 %0d %0d %0d %0d", ii1, jj1, ii2, jj2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
