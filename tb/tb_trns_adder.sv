// tb_trns_adder - modular adder, exhaustively for every modulus of the sets {1, 2, 3} (N = 1),
// {7, 8, 9} (N = 2) and {79, 80, 81} (N = 4): sum == (a + b) mod m for all a, b < m, and `wrap` exactly when
// a + b >= m.
module tb_trns_adder;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [0:0] ua [3], ub [3], us [3];
  logic        uw [3];
  trit_t [1:0] sa [3], sb [3], ss [3];
  logic        sw [3];
  trit_t [3:0] la [3], lb [3], ls [3];
  logic        lw [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    trns_adder #(.N(1), .MODV(3 - g))  u_u (.a(ua[g]), .b(ub[g]), .sum(us[g]), .wrap(uw[g]));
    trns_adder #(.N(2), .MODV(9 - g))  u_s (.a(sa[g]), .b(sb[g]), .sum(ss[g]), .wrap(sw[g]));
    trns_adder #(.N(4), .MODV(81 - g)) u_l (.a(la[g]), .b(lb[g]), .sum(ls[g]), .wrap(lw[g]));
  end

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
    for (int g = 0; g < 3; g++) begin
      automatic int m = 3 - g;
      for (int a = 0; a < m; a++)
        for (int b = 0; b < m; b++) begin
          automatic tword_t ta = to_tvl(longint'(a)), tb = to_tvl(longint'(b)), ts = '0;
          ua[g] = ta[0:0]; ub[g] = tb[0:0];
          #1;
          ts[0:0] = us[g];
          check(from_tvl(ts) == longint'((a + b) % m) && uw[g] == (a + b >= m),
                $sformatf("m=%0d %0d+%0d -> %0d", m, a, b, from_tvl(ts)));
        end
    end
    for (int g = 0; g < 3; g++) begin
      automatic int m = 9 - g;
      for (int a = 0; a < m; a++)
        for (int b = 0; b < m; b++) begin
          automatic tword_t ta = to_tvl(longint'(a)), tb = to_tvl(longint'(b)), ts = '0;
          sa[g] = ta[1:0]; sb[g] = tb[1:0];
          #1;
          ts[1:0] = ss[g];
          check(from_tvl(ts) == longint'((a + b) % m) && sw[g] == (a + b >= m),
                $sformatf("m=%0d %0d+%0d -> %0d", m, a, b, from_tvl(ts)));
        end
    end
    for (int g = 0; g < 3; g++) begin
      automatic int m = 81 - g;
      for (int a = 0; a < m; a++)
        for (int b = 0; b < m; b++) begin
          automatic tword_t ta = to_tvl(longint'(a)), tb = to_tvl(longint'(b)), ts = '0;
          la[g] = ta[3:0]; lb[g] = tb[3:0];
          #1;
          ts[3:0] = ls[g];
          check(from_tvl(ts) == longint'((a + b) % m) && lw[g] == (a + b >= m),
                $sformatf("m=%0d %0d+%0d -> %0d", m, a, b, from_tvl(ts)));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
