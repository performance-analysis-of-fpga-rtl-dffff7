// tb_pow2_lut - the 2^k table for 1-trit indices (k = 0..4, 3-trit entries) and for 2-trit
// indices (k = 0..16, 11-trit entries), against shifts of 1; the entry widths must match the
// DBTNS multiplier data table (N = 3 and 11).
module tb_pow2_lut;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [1:0]  k1;
  trit_t [2:0]  p1;
  trit_t [2:0]  k2;
  trit_t [10:0] p2;

  pow2_lut #(.IDX_N(1)) dut1 (.k(k1), .p(p1));
  pow2_lut #(.IDX_N(2)) dut2 (.k(k2), .p(p2));

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
    check(dut1.N == 3 && dut2.N == 11, "entry widths");
    for (int k = 0; k <= 4; k++) begin
      automatic tword_t t = to_tvl(longint'(k)), p = '0;
      k1 = t[1:0];
      #1;
      p[2:0] = p1;
      check(from_tvl(p) == (64'd1 << k), $sformatf("n=1 k=%0d got %0d", k, from_tvl(p)));
    end
    for (int k = 0; k <= 16; k++) begin
      automatic tword_t t = to_tvl(longint'(k)), p = '0;
      k2 = t[2:0];
      #1;
      p[10:0] = p2;
      check(from_tvl(p) == (64'd1 << k), $sformatf("n=2 k=%0d got %0d", k, from_tvl(p)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
