// tb_rns_to_int_lut - residue-to-integer table conversion.
// Moduli {7, 8, 9}: every X in 0..503. Moduli {79, 80, 81}: X = 0, M-1 and 5000 random values.
// The residues are formed here with the % operator; y must give X back.
module tb_rns_to_int_lut;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [1:0] s0, s1, s2;
  logic [8:0]  sy;
  trit_t [3:0] l0, l1, l2;
  logic [18:0] ly;

  rns_to_int_lut #(.N(2)) dut2 (.r0(s0), .r1(s1), .r2(s2), .y(sy));
  rns_to_int_lut          dut4 (.r0(l0), .r1(l1), .r2(l2), .y(ly));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run4(longint unsigned x);
    tword_t t;
    t = to_tvl(x % 81); l0 = t[3:0];
    t = to_tvl(x % 80); l1 = t[3:0];
    t = to_tvl(x % 79); l2 = t[3:0];
    #1;
    check(longint'(ly) == x, $sformatf("M=511920 X=%0d y=%0d", x, ly));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut4.YB == 19 && dyn_range(4) == 511920 && dyn_range(2) == 504 && dyn_range(3) == 17550,
          "dynamic ranges");
    for (int x = 0; x < 504; x++) begin
      tword_t t;
      t = to_tvl(longint'(x % 9)); s0 = t[1:0];
      t = to_tvl(longint'(x % 8)); s1 = t[1:0];
      t = to_tvl(longint'(x % 7)); s2 = t[1:0];
      #1;
      check(int'(sy) == x, $sformatf("M=504 X=%0d y=%0d", x, sy));
    end
    run4(0);
    run4(511919);
    for (int n = 0; n < 5000; n++) run4(longint'($urandom_range(0, 511919)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
