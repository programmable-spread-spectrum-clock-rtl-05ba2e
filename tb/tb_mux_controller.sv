// tb_mux_controller: self-checking test of the MUX controller.
//
// Feeds random sigma-delta codes and checks after every clock that the phase
// index has moved by the step of the code table (11: +1, 00: 0, 01: -1,
// 10: -2, modulo 8) and that the select word is the one-hot code of the
// index table (000 -> S1 ... 111 -> S8). Also checks the reset state and
// that wrap-around in both directions happened.
module tb_mux_controller;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  sdm_code_e  code = SDM_HOLD;
  logic [2:0] phase_idx;
  logic [7:0] phase_sel;
  int checks = 0, failures = 0;
  int exp_idx = 0, wrap_up = 0, wrap_dn = 0;
  int step_of[4] = '{0, -1, -2, 1};

  mux_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int raw;
    #1 rst_n = 1'b0;
    #2;
    check(phase_idx == 3'd0 && phase_sel == 8'b0000_0001, "reset selects S1");
    #5 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      code = sdm_code_e'($urandom_range(0, 3));
      @(posedge clk); #1;
      raw = exp_idx + step_of[int'(code)];
      if (raw > 7) wrap_up++;
      if (raw < 0) wrap_dn++;
      exp_idx = (raw + 8) % 8;
      check(int'(phase_idx) == exp_idx, $sformatf("index %0d expected %0d", phase_idx, exp_idx));
      check(phase_sel == 8'(1 << exp_idx), $sformatf("select %b for index %0d", phase_sel, exp_idx));
    end
    check(wrap_up > 0 && wrap_dn > 0, "wrap-around both ways");
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
