// tb_trns_conv - product to residues {Xm2, Xm1, Xm0}.
// Default sizes (7-trit product, moduli 79, 80, 81): every 7-trit value.
// 27-trit products (2-trit indices) with moduli 7, 8, 9, which exercise the chained reduction:
// 3000 random values, and the largest product 2^16*3^16.
module tb_trns_conv;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [6:0]  a_x;
  trit_t [3:0]  a0, a1, a2;
  trit_t [26:0] b_x;
  trit_t [1:0]  b0, b1, b2;

  trns_conv dut_a (.x(a_x), .xm0(a0), .xm1(a1), .xm2(a2));
  trns_conv #(.N(2), .PT(27)) dut_b (.x(b_x), .xm0(b0), .xm1(b1), .xm2(b2));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint unsigned v4(trit_t [3:0] t);
    tword_t w = '0;
    w[3:0] = t;
    return from_tvl(w);
  endfunction
  function automatic longint unsigned v2(trit_t [1:0] t);
    tword_t w = '0;
    w[1:0] = t;
    return from_tvl(w);
  endfunction

  task automatic run_b(longint unsigned v);
    tword_t t = to_tvl(v);
    b_x = t[26:0];
    #1;
    check(v2(b0) == v % 9 && v2(b1) == v % 8 && v2(b2) == v % 7,
          $sformatf("PT=27 %0d -> %0d %0d %0d", v, v2(b2), v2(b1), v2(b0)));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2187; v++) begin
      automatic tword_t t = to_tvl(longint'(v));
      a_x = t[6:0];
      #1;
      check(v4(a0) == longint'(v % 81) && v4(a1) == longint'(v % 80) && v4(a2) == longint'(v % 79),
            $sformatf("PT=7 %0d -> %0d %0d %0d", v, v4(a2), v4(a1), v4(a0)));
    end
    for (int n = 0; n < 3000; n++) run_b({$urandom, $urandom} % pow3(27));
    run_b((64'd1 << 16) * pow3(16));
    run_b(pow3(27) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
