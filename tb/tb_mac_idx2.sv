// tb_mac_idx2 - the MAC unit with 2-trit indices (operands 2^i*3^j, i, j in 0..8, 14-trit
// ternary words, 27-trit products) for the three moduli sets {7, 8, 9}, {25, 26, 27} and
// {79, 80, 81}: the datapath of the 8-tap filter configurations with index trit length 2.
// 40 runs of 8 accumulate cycles each, started by a clear; after every run the residues of each
// instance must equal (exact sum of the 8 products) mod m_i. Products here reach 2^16*3^16, far
// beyond every dynamic range, so the long-product residue chains are exercised on every cycle.
module tb_mac_idx2;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0;
  always #5 clk = ~clk;
  trit_t [13:0] x, h;
  trit_t [1:0]  a0, a1, a2;
  trit_t [2:0]  b0, b1, b2;
  trit_t [3:0]  c0, c1, c2;
  logic         ma, mb, mc;

  mac_unit #(.IDX_N(2), .N(2)) u_n2 (.clk(clk), .rst_n(rst_n), .clr(clr), .acc_en(acc_en), .x(x), .h(h),
                                     .acc0(a0), .acc1(a1), .acc2(a2), .miss(ma));
  mac_unit #(.IDX_N(2), .N(3)) u_n3 (.clk(clk), .rst_n(rst_n), .clr(clr), .acc_en(acc_en), .x(x), .h(h),
                                     .acc0(b0), .acc1(b1), .acc2(b2), .miss(mb));
  mac_unit #(.IDX_N(2), .N(4)) u_n4 (.clk(clk), .rst_n(rst_n), .clr(clr), .acc_en(acc_en), .x(x), .h(h),
                                     .acc0(c0), .acc1(c1), .acc2(c2), .miss(mc));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint unsigned rand_operand();
    if ($urandom_range(0, 15) == 0) return 0;
    return (64'd1 << $urandom_range(0, 8)) * pow3($urandom_range(0, 8));
  endfunction

  function automatic longint unsigned v(trit_t [3:0] t, int w);
    tword_t tw = '0;
    for (int k = 0; k < w; k++) tw[k] = t[k];
    return from_tvl(tw);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      longint unsigned sum = 0;
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      acc_en = 1;
      for (int k = 0; k < 8; k++) begin
        longint unsigned xv = rand_operand(), hv = rand_operand();
        tword_t t;
        t = to_tvl(xv); x = t[13:0];
        t = to_tvl(hv); h = t[13:0];
        sum += xv * hv;
        #1 check(!ma && !mb && !mc, "no miss");
        @(negedge clk);
      end
      acc_en = 0;
      #1;
      check(v({4'b0, a0}, 2) == sum % 9 && v({4'b0, a1}, 2) == sum % 8 && v({4'b0, a2}, 2) == sum % 7,
            $sformatf("run %0d moduli 7,8,9 sum %0d", run, sum));
      check(v({2'b0, b0}, 3) == sum % 27 && v({2'b0, b1}, 3) == sum % 26 && v({2'b0, b2}, 3) == sum % 25,
            $sformatf("run %0d moduli 25,26,27 sum %0d", run, sum));
      check(v(c0, 4) == sum % 81 && v(c1, 4) == sum % 80 && v(c2, 4) == sum % 79,
            $sformatf("run %0d moduli 79,80,81 sum %0d", run, sum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
