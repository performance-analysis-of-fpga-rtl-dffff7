// tb_coef_lut - coefficient table: write 8 random ternary words, read every address back, then
// overwrite some and read again.
module tb_coef_lut;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  logic [2:0] waddr, raddr;
  trit_t [3:0] wdata, rdata;
  trit_t [3:0] model [8];

  coef_lut dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  function automatic trit_t [3:0] rand_word();
    trit_t [3:0] w;
    for (int k = 0; k < 4; k++) w[k] = trit_t'($urandom_range(0, 2));
    return w;
  endfunction

  task automatic write(int a);
    @(negedge clk);
    we = 1; waddr = 3'(a); wdata = rand_word();
    model[a] = wdata;
    @(negedge clk);
    we = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < 8; a++) begin
      raddr = 3'(a);
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        $display("FAIL addr %0d: %h vs %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) write(a);
    read_all();
    for (int n = 0; n < 20; n++) write($urandom_range(0, 7));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
