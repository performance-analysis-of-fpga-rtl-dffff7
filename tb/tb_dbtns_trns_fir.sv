// tb_dbtns_trns_fir - end-to-end test of the FIR filter at its default sizes (1-trit indices,
// moduli 79, 80, 81, 8 taps).
// Loads 8 coefficients, then streams 80 input samples; for each the testbench pulses start,
// serves x(n-pc) from its own sample history while the program counter runs, and checks that
// y_valid comes exactly TAPS+1 = 9 cycles after start with y_int == sum_k x(n-k)*h(k) computed
// here in integers (exact, since 8*36*36 < 511920). Coefficients are reloaded halfway. Operands
// are zeros and 2^i*3^j values; one sample without such a form checks the miss flag and its
// zero contribution, and a start pulse during a run must be ignored.
// Counts every mechanism of the datapath and fails if one never happened: modular wrap of each
// residue adder, a nonzero barrel shift, a zero operand, a miss, an ignored start and a
// coefficient reload. The carry selects of the residue converters are only reported: with
// moduli 79, 80, 81 no product of two 2^i*3^j operands (at most 1296) makes Xhi+Xlo or
// 2*Xhi+Xlo reach 81, so they stay 0 here; tb_fir_table5 and the converter tests cover them.
module tb_dbtns_trns_fir;
  import tvl_pkg::*;
  localparam int TAPS = 8;
  int checks = 0, failures = 0;
  int wraps [3], m1_sel1 = 0, m2_sel1 = 0, m2_sel2 = 0, shifts = 0, zero_ops = 0;
  int misses = 0, ignored_starts = 0, reloads = 0;

  logic       clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       coef_we = 0, start = 0;
  logic [2:0] coef_addr = '0, pc;
  logic [5:0] coef_int = '0, x_int;
  logic       busy, y_valid, dbtns_miss;
  logic [18:0] y_int;

  int coef [TAPS];
  int hist [TAPS];      // hist[k] = x(n-k)

  dbtns_trns_fir dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_int(coef_int),
    .start(start), .x_int(x_int), .pc(pc), .busy(busy), .y_valid(y_valid), .y_int(y_int),
    .dbtns_miss(dbtns_miss)
  );

  // sample source: x(n-pc) for the tap being processed
  assign x_int = 6'(hist[pc]);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int rand_operand();
    if ($urandom_range(0, 9) == 0) return 0;
    return (1 << $urandom_range(0, 2)) * int'(pow3($urandom_range(0, 2)));
  endfunction

  task automatic load_coefs();
    for (int k = 0; k < TAPS; k++) begin
      @(negedge clk);
      coef[k]   = rand_operand();
      coef_we   = 1;
      coef_addr = 3'(k);
      coef_int  = 6'(coef[k]);
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // count datapath events while the MAC accumulates
  always @(posedge clk) begin
    if (dut.acc_en) begin
      wraps[0] += int'(dut.u_mac.u_add0.wrap);
      wraps[1] += int'(dut.u_mac.u_add1.wrap);
      wraps[2] += int'(dut.u_mac.u_add2.wrap);
      if (dut.u_mac.u_conv.g_fold[0].u_m1.sel == 2'd1) m1_sel1++;
      if (dut.u_mac.u_conv.g_fold[0].u_m2.sel == 2'd1) m2_sel1++;
      if (dut.u_mac.u_conv.g_fold[0].u_m2.sel == 2'd2) m2_sel2++;
      if (dut.u_mac.u_mult.u_shift.s != '0) shifts++;
      if (dut.x_tvl == '0 || dut.h_tvl == '0) zero_ops++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int n = 0; n < 80; n++) begin
      int expected, lat;
      logic bad_sample;
      if (n == 40) begin
        load_coefs();
        reloads++;
      end
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      bad_sample = (n == 20);
      hist[0] = bad_sample ? 5 : rand_operand();
      expected = 0;
      for (int k = 0; k < TAPS; k++)
        if (hist[k] != 5) expected += hist[k] * coef[k];
      @(negedge clk);
      check(!busy, "idle before start");
      start = 1;
      @(negedge clk);
      start = (n == 10);     // a start pulse during the run is ignored
      lat = 1;
      while (!y_valid && lat < 50) begin
        @(negedge clk);
        start = 0;
        lat++;
      end
      if (n == 10) ignored_starts++;
      check(lat == TAPS + 1, $sformatf("sample %0d latency %0d", n, lat));
      check(int'(y_int) == expected, $sformatf("sample %0d y=%0d expected %0d", n, y_int, expected));
      // the bad sample sits in the history for TAPS outputs
      check(dbtns_miss == (n >= 20 && n < 20 + TAPS), $sformatf("sample %0d miss flag %0d", n, dbtns_miss));
      if (dbtns_miss) misses++;
      @(negedge clk);
      check(!y_valid && !busy, "single y_valid cycle");
    end
    $display("wraps %0d %0d %0d; conv selects m1:1=%0d m2:1=%0d m2:2=%0d; shifts %0d; zero operands %0d",
             wraps[0], wraps[1], wraps[2], m1_sel1, m2_sel1, m2_sel2, shifts, zero_ops);
    $display("misses %0d, ignored starts %0d, coefficient reloads %0d", misses, ignored_starts, reloads);
    check(wraps[0] > 0 && wraps[1] > 0 && wraps[2] > 0, "modular wrap on every adder");
    check(shifts > 0, "barrel shift");
    check(zero_ops > 0, "zero operand");
    check(misses > 0, "miss");
    check(ignored_starts > 0, "ignored start");
    check(reloads > 0, "coefficient reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
