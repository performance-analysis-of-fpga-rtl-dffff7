// tb_int_to_tvl_lut - every 6-bit integer through the integer-to-ternary table; the trits are
// weighted by powers of three here and must give the integer back, and no trit may be 3.
module tb_int_to_tvl_lut;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0] x_int;
  trit_t [3:0] x_tvl;

  int_to_tvl_lut dut (.x_int(x_int), .x_tvl(x_tvl));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int acc, w;
      logic bad;
      x_int = 6'(v);
      #1;
      acc = 0; w = 1; bad = 0;
      for (int k = 0; k < 4; k++) begin
        if (x_tvl[k] == 2'd3) bad = 1;
        acc += int'(x_tvl[k]) * w;
        w *= 3;
      end
      checks++;
      if (bad || acc != v) begin
        failures++;
        $display("FAIL %0d -> %0d", v, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
