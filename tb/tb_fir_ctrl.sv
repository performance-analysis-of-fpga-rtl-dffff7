// tb_fir_ctrl - sequencer timing for 8 taps: start clears in its own cycle, then exactly 8
// accumulate cycles with pc = 0..7, then one y_valid cycle (TAPS+1 cycles after start), busy in
// between, and a start pulse while busy is ignored. Five runs with random idle gaps.
module tb_fir_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [2:0] pc;
  logic clr, acc_en, y_valid, busy;

  fir_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .pc(pc), .clr(clr), .acc_en(acc_en),
                .y_valid(y_valid), .busy(busy));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
      check(!busy && !acc_en && !y_valid, "idle before start");
      start = 1;
      #1 check(clr, "clr with start");
      @(negedge clk);
      start = (run == 2);          // a start while busy must be ignored
      for (int k = 0; k < 8; k++) begin
        check(acc_en && busy && !y_valid && !clr && pc == 3'(k), $sformatf("run %0d tap %0d pc=%0d", run, k, pc));
        @(negedge clk);
        start = 0;
      end
      check(y_valid && busy && !acc_en, "y_valid after 8 taps");
      @(negedge clk);
      check(!y_valid && !busy, "idle after y_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
