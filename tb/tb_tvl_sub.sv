// tb_tvl_sub - exhaustive check of the 3-trit ternary subtractor: diff == (a - b) mod 27 and
// bout == (a < b) for every a, b in 0..26.
module tb_tvl_sub;
  import tvl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  trit_t [W-1:0] a, b, diff;
  logic bout;

  tvl_sub #(.W(W)) dut (.a(a), .b(b), .diff(diff), .bout(bout));

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
      for (int y = 0; y < 27; y++) begin
        tword_t tx, ty;
        tx = to_tvl(longint'(x));
        ty = to_tvl(longint'(y));
        a = tx[W-1:0]; b = ty[W-1:0];
        #1;
        checks++;
        if (val(diff) != longint'((x - y + 27) % 27) || bout != (x < y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d-%0d: diff=%0d bout=%0d", x, y, val(diff), bout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
