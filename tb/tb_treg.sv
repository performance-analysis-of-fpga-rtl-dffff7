// tb_treg - ternary register: after reset it holds 0; with random clr/en/d for 500 clocks it
// must follow a reference model (clr -> 0, else en -> d, else hold).
module tb_treg;
  import tvl_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  always #5 clk = ~clk;
  trit_t [11:0] d, q, model;

  treg dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q));

  function automatic trit_t [11:0] rand_word();
    trit_t [11:0] w;
    for (int k = 0; k < 12; k++) w[k] = trit_t'($urandom_range(0, 2));
    return w;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = rand_word();
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) failures++;
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 7) == 0);
      en  = ($urandom_range(0, 2) != 0);
      d   = rand_word();
      @(posedge clk);
      if (clr) model = '0;
      else if (en) model = d;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q=%h model=%h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
