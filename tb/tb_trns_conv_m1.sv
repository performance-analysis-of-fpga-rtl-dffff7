// tb_trns_conv_m1 - residue modulo 3^N-1 of a 2N-trit number, exhaustively for N = 2
// (modulus 8) and N = 4 (modulus 80): r == (hi*3^N + lo) mod m and r < m.
// Counts how often the carry that steers the multiplexer took each value; every value the
// arithmetic allows must occur.
module tb_trns_conv_m1;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  int sel_seen [3];
  logic clk = 0;
  always #5 clk = ~clk;

  trit_t [1:0] a_hi, a_lo, a_r;
  trit_t       a_sel;
  trit_t [3:0] b_hi, b_lo, b_r;
  trit_t       b_sel;

  trns_conv_m1 #(.N(2)) dut2 (.x_hi(a_hi), .x_lo(a_lo), .r(a_r), .sel(a_sel));
  trns_conv_m1 #(.N(4)) dut4 (.x_hi(b_hi), .x_lo(b_lo), .r(b_r), .sel(b_sel));

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
    for (int h = 0; h < 9; h++)
      for (int l = 0; l < 9; l++) begin
        automatic tword_t th = to_tvl(longint'(h)), tl = to_tvl(longint'(l)), tr = '0;
        a_hi = th[1:0]; a_lo = tl[1:0];
        #1;
        tr[1:0] = a_r;
        check(from_tvl(tr) == longint'((h * 9 + l) % (9 - 1)), $sformatf("N=2 %0d:%0d -> %0d", h, l, from_tvl(tr)));
        sel_seen[a_sel]++;
      end
    for (int h = 0; h < 81; h++)
      for (int l = 0; l < 81; l++) begin
        automatic tword_t th = to_tvl(longint'(h)), tl = to_tvl(longint'(l)), tr = '0;
        b_hi = th[3:0]; b_lo = tl[3:0];
        #1;
        tr[3:0] = b_r;
        check(from_tvl(tr) == longint'((h * 81 + l) % (81 - 1)), $sformatf("N=4 %0d:%0d -> %0d", h, l, from_tvl(tr)));
        sel_seen[b_sel]++;
      end
    $display("carry select seen: 0:%0d 1:%0d 2:%0d", sel_seen[0], sel_seen[1], sel_seen[2]);
    check(sel_seen[0] > 0 && sel_seen[1] > 0, "carry 0 and 1 both exercised");
    if (1 == 2) check(sel_seen[2] > 0, "carry 2 exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
