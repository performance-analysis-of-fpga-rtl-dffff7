// tb_tvl_barrel_shifter - every 3-trit input shifted by every amount 0..4 (2-trit amount) must
// equal input * 3^amount; a wider instance (11 trits, amounts 0..16) is checked on random data.
module tb_tvl_barrel_shifter;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [2:0]  d1;
  trit_t [1:0]  s1;
  trit_t [6:0]  y1;
  trit_t [10:0] d2;
  trit_t [2:0]  s2;
  trit_t [26:0] y2;

  tvl_barrel_shifter dut1 (.d(d1), .s(s1), .y(y1));
  tvl_barrel_shifter #(.W_IN(11), .SW(3), .SMAX(16)) dut2 (.d(d2), .s(s2), .y(y2));

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
    for (int v = 0; v < 27; v++)
      for (int s = 0; s <= 4; s++) begin
        automatic tword_t tv = to_tvl(longint'(v)), ts = to_tvl(longint'(s)), ty = '0;
        d1 = tv[2:0]; s1 = ts[1:0];
        #1;
        ty[6:0] = y1;
        check(from_tvl(ty) == longint'(v) * pow3(s), $sformatf("%0d<<%0d = %0d", v, s, from_tvl(ty)));
      end
    for (int n = 0; n < 500; n++) begin
      automatic longint unsigned v = longint'($urandom_range(0, 177146));   // 3^11 - 1
      automatic int s = $urandom_range(0, 16);
      automatic tword_t tv = to_tvl(v), ts = to_tvl(longint'(s)), ty = '0;
      d2 = tv[10:0]; s2 = ts[2:0];
      #1;
      ty[26:0] = y2;
      check(from_tvl(ty) == v * pow3(s), $sformatf("wide %0d<<%0d", v, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
