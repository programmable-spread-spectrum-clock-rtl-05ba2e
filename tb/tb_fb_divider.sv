// tb_fb_divider: self-checking test of the PLL feedback divider.
//
// Runs the default divide-by-2 instance and a divide-by-5 instance and checks
// that each output period spans N input clocks, that the output is high for
// ceil(N/2) of them, and that it rises on the input edge where the count
// wraps.
module tb_fb_divider;

  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic fdiv2, fdiv5;
  int checks = 0, failures = 0;

  fb_divider          dut2 (.clk(clk), .rst_n(rst_n), .fdiv(fdiv2));
  fb_divider #(.N(5)) dut5 (.clk(clk), .rst_n(rst_n), .fdiv(fdiv5));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc2 = 0, hi2 = 0, cyc5 = 0, hi5 = 0, per2 = 0, per5 = 0;
  logic f2_q = 1'b0, f5_q = 1'b0;

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      cyc2++; cyc5++;
      if (fdiv2) hi2++;
      if (fdiv5) hi5++;
      if (fdiv2 && !f2_q) begin
        if (per2 > 0) begin
          check(cyc2 == 2 && hi2 == 1, $sformatf("N=2 period %0d high %0d", cyc2, hi2));
        end
        per2++; cyc2 = 0; hi2 = 0;
      end
      if (fdiv5 && !f5_q) begin
        if (per5 > 0) begin
          check(cyc5 == 5 && hi5 == 3, $sformatf("N=5 period %0d high %0d", cyc5, hi5));
        end
        per5++; cyc5 = 0; hi5 = 0;
      end
      f2_q = fdiv2; f5_q = fdiv5;
    end
    check(per2 > 90 && per5 > 35, "enough periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
