// tb_tvl_lt - exhaustive check of the 3-trit ternary magnitude comparator against integer
// comparison for every a, b in 0..26.
module tb_tvl_lt;
  import tvl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  trit_t [W-1:0] a, b;
  logic lt;

  tvl_lt #(.W(W)) dut (.a(a), .b(b), .lt(lt));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 27; x++)
      for (int y = 0; y < 27; y++) begin
        tword_t tx, ty;
        tx = to_tvl(longint'(x));
        ty = to_tvl(longint'(y));
        a = tx[W-1:0]; b = ty[W-1:0];
        #1;
        checks++;
        if (lt != (x < y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d<%0d: lt=%0d", x, y, lt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
