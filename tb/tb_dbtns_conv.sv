// tb_dbtns_conv - ternary-to-DBTNS index conversion.
// 1-trit indices: all 81 four-trit inputs; each of the nine values 2^i*3^j (i, j in 0..2) must
// give its (i, j), 0 must raise `zero`, every other value `miss`. The nine table values are also
// checked against the printed ternary strings of the 1-trit DBTNS table.
// 2-trit indices (14-trit operands): all 81 pairs (i, j) in 0..8 and 2000 random other values.
module tb_dbtns_conv;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [3:0]  x1;
  trit_t [0:0]  i1, j1;
  logic         z1, m1;
  trit_t [13:0] x2;
  trit_t [1:0]  i2, j2;
  logic         z2, m2;

  dbtns_conv #(.IDX_N(1))            dut1 (.x(x1), .i(i1), .j(j1), .zero(z1), .miss(m1));
  dbtns_conv #(.IDX_N(2), .XT(14))   dut2 (.x(x2), .i(i2), .j(j2), .zero(z2), .miss(m2));

  // (i, j) with v = 2^i*3^j and i, j <= imax, or -1
  function automatic int find_ij(longint unsigned v, int imax, output int fi, output int fj);
    fi = -1; fj = -1;
    for (int a = 0; a <= imax; a++)
      for (int b = 0; b <= imax; b++)
        if ((64'd1 << a) * pow3(b) == v) begin fi = a; fj = b; end
    return fi;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Ternary strings of the 1-trit DBTNS table, row i, columns j = 0, 1, 2.
  string tab1 [3][3] = '{'{"0001", "0010", "0100"}, '{"0002", "0020", "0200"}, '{"0011", "0110", "1100"}};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fi, fj;
    // 1-trit indices, exhaustive
    for (int v = 0; v < 81; v++) begin
      automatic tword_t t = to_tvl(longint'(v));
      x1 = t[3:0];
      #1;
      void'(find_ij(longint'(v), 2, fi, fj));
      if (v == 0) check(z1 && !m1, $sformatf("zero v=%0d", v));
      else if (fi < 0) check(!z1 && m1, $sformatf("miss v=%0d", v));
      else check(!z1 && !m1 && int'(i1[0]) == fi && int'(j1[0]) == fj,
                 $sformatf("v=%0d i=%0d j=%0d exp %0d %0d", v, i1[0], j1[0], fi, fj));
    end
    // printed 1-trit table
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        automatic int v = 0;
        for (int c = 0; c < 4; c++) v = v * 3 + (tab1[a][b][c] - "0");
        check(longint'(v) == (64'd1 << a) * pow3(b), $sformatf("table1 %0d %0d", a, b));
      end
    // 2-trit indices, every table value
    for (int a = 0; a < 9; a++)
      for (int b = 0; b < 9; b++) begin
        automatic tword_t t = to_tvl((64'd1 << a) * pow3(b));
        automatic tword_t ti = '0, tj = '0;
        x2 = t[13:0];
        #1;
        ti[1:0] = i2; tj[1:0] = j2;
        check(!z2 && !m2 && from_tvl(ti) == longint'(a) && from_tvl(tj) == longint'(b),
              $sformatf("idx2 i=%0d j=%0d", a, b));
      end
    // 2-trit indices, random values
    for (int n = 0; n < 2000; n++) begin
      automatic longint unsigned v = longint'($urandom_range(1, 4000000));
      automatic tword_t t = to_tvl(v);
      x2 = t[13:0];
      #1;
      void'(find_ij(v, 8, fi, fj));
      if (fi < 0) check(m2 && !z2, $sformatf("idx2 miss v=%0d", v));
      else begin
        automatic tword_t ti = '0, tj = '0;
        ti[1:0] = i2; tj[1:0] = j2;
        check(!m2 && from_tvl(ti) == longint'(fi) && from_tvl(tj) == longint'(fj), $sformatf("idx2 v=%0d", v));
      end
    end
    x2 = '0;
    #1 check(z2 && !m2, "idx2 zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
