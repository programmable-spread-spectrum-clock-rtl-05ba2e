// tb_prog_divider: self-checking test of the 6-bit programmable divider.
//
// For a set of ratios (2, 3, 6, 13, 62, 63 and the out-of-range 0 and 1,
// which act as 2) checks that the reload pulse repeats every N clocks, that
// the first pulse after reset comes N clocks after reset is released, and
// that clk_tri is high for ceil(N/2) clocks of each period.
module tb_prog_divider;

  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [5:0] n_div = 6'd2;
  logic       tick, clk_tri;
  int checks = 0, failures = 0;

  prog_divider dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_ratio(int n);
    int eff, cyc, hi;
    eff = (n < 2) ? 2 : n;
    n_div = 6'(n);
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    // first tick: N clocks after release
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!tick && cyc < 100);
    check(cyc == eff, $sformatf("N=%0d first tick after %0d clocks", n, cyc));
    // next three periods
    for (int p = 0; p < 3; p++) begin
      cyc = 0; hi = 0;
      do begin @(posedge clk); #1; cyc++; if (clk_tri) hi++; end while (!tick && cyc < 100);
      check(cyc == eff, $sformatf("N=%0d period %0d clocks", n, cyc));
      check(hi == (eff + 1) / 2, $sformatf("N=%0d clk_tri high %0d clocks", n, hi));
    end
  endtask

  initial begin
    run_ratio(2);  run_ratio(3);  run_ratio(6);  run_ratio(13);
    run_ratio(62); run_ratio(63); run_ratio(0);  run_ratio(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
