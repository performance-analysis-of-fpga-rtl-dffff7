// tb_mac_unit - DBTNS-TRNS multiply-accumulate unit at its default sizes (1-trit indices,
// moduli 79, 80, 81). 3000 clocks of random operands (mostly 2^i*3^j values, some zeros, some
// values without such a form), random accumulate enables and occasional clears. After every
// clock the three TReg residues must equal (sum of products since the last clear) mod m_i,
// where an operand that is 0 or has no 2^i*3^j form contributes 0, and `miss` must flag exactly
// the latter. Counts the modular wrap of each adder, misses and zero operands; each must occur.
module tb_mac_unit;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  int wraps [3], misses = 0, zeros = 0;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0;
  always #5 clk = ~clk;
  trit_t [3:0] x, h, acc0, acc1, acc2;
  logic miss;

  mac_unit dut (.clk(clk), .rst_n(rst_n), .clr(clr), .acc_en(acc_en), .x(x), .h(h),
                .acc0(acc0), .acc1(acc1), .acc2(acc2), .miss(miss));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int rand_operand();
    int r = $urandom_range(0, 19);
    if (r == 0) return 0;
    if (r == 1) return 5 + 2 * $urandom_range(0, 3);            // 5, 7, 9(->ok), 11
    return (1 << $urandom_range(0, 2)) * int'(pow3($urandom_range(0, 2)));
  endfunction

  function automatic logic representable(int v);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if ((1 << a) * int'(pow3(b)) == v) return 1;
    return 0;
  endfunction

  function automatic longint unsigned v4(trit_t [3:0] t);
    tword_t w = '0;
    w[3:0] = t;
    return from_tvl(w);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned model = 0;
    x = '0; h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int xv, hv;
      logic xm, hm;
      tword_t t;
      @(negedge clk);
      xv = rand_operand(); hv = rand_operand();
      t = to_tvl(longint'(xv)); x = t[3:0];
      t = to_tvl(longint'(hv)); h = t[3:0];
      clr    = ($urandom_range(0, 40) == 0);
      acc_en = ($urandom_range(0, 5) != 0);
      xm = (xv != 0) && !representable(xv);
      hm = (hv != 0) && !representable(hv);
      #1;
      check(miss == (xm || hm), $sformatf("miss x=%0d h=%0d", xv, hv));
      if (miss) misses++;
      if (xv == 0 || hv == 0) zeros++;
      if (acc_en && !clr) begin
        wraps[0] += int'(dut.u_add0.wrap);
        wraps[1] += int'(dut.u_add1.wrap);
        wraps[2] += int'(dut.u_add2.wrap);
      end
      @(posedge clk);
      if (clr) model = 0;
      else if (acc_en && !xm && !hm) model += longint'(xv * hv);
      #1;
      check(v4(acc0) == model % 81 && v4(acc1) == model % 80 && v4(acc2) == model % 79,
            $sformatf("cycle %0d sum=%0d got %0d %0d %0d", n, model, v4(acc2), v4(acc1), v4(acc0)));
    end
    $display("wraps %0d %0d %0d, misses %0d, zero operands %0d", wraps[0], wraps[1], wraps[2], misses, zeros);
    check(wraps[0] > 0 && wraps[1] > 0 && wraps[2] > 0, "every modular adder wrapped");
    check(misses > 0 && zeros > 0, "miss and zero operands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
