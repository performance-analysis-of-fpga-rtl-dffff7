// tb_tvl_rca - exhaustive check of the 3-trit ternary ripple carry adder: every a, b in 0..26
// and carry-in 0..2 against integer addition, sum + 27*cout == a + b + cin.
module tb_tvl_rca;
  import tvl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  trit_t [W-1:0] a, b, sum;
  trit_t cin, cout;

  tvl_rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic longint unsigned val(trit_t [W-1:0] t);
    tword_t w = '0;
    w[W-1:0] = t;
    return from_tvl(w);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 27; x++)
      for (int y = 0; y < 27; y++)
        for (int c = 0; c < 3; c++) begin
          tword_t tx, ty;
          tx = to_tvl(longint'(x));
          ty = to_tvl(longint'(y));
          a = tx[W-1:0]; b = ty[W-1:0]; cin = trit_t'(c);
          #1;
          checks++;
          if (val(sum) + 27 * longint'(cout) != longint'(x + y + c) || cout > 2) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d: sum=%0d cout=%0d", x, y, c, val(sum), cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
