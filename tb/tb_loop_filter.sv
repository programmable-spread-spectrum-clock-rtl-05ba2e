// tb_loop_filter: self-checking test of the third-order loop-filter model.
//
// Injects known current pulses and checks the network against hand-derived
// results: (1) charge conservation: after a 100 uA, 2 ns pulse and time to
// settle, all nodes sit at V_INIT + Q / (C1 + C2 + C3); (2) the immediate
// step on the charge-pump node of a short pulse is Q / C1 (C2 behind R2 and
// C3 behind R3 take no charge in 50 ps... within 10 %); (3) the
// proportional path: with a constant 10 uA for 5 ns the filter node has an
// offset of I * R2 above the integrated ramp once the fast poles settled,
// for R2 words 0 and 3 (500 and 2000 ohm).
module tb_loop_filter;

  timeunit 1ps;
  timeprecision 1fs;

  localparam real C1 = 10.0e-12, C2 = 120.0e-12, C3 = 2.0e-12, V0 = 0.6;

  real        icp = 0.0;
  logic [1:0] lf_code = 2'd1;
  real        vctrl;
  int checks = 0, failures = 0;

  loop_filter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real q, v_exp, dv, r2, ramp;
    #100;
    // (1) + (2)
    icp = 100.0e-6; #50; icp = 0.0;
    #1;
    dv = dut.v1 - V0;
    q  = 100.0e-6 * 50.0e-12;
    check(dv > 0.9 * q / C1 && dv < 1.1 * q / C1, $sformatf("fast step %g V (exp %g)", dv, q / C1));
    icp = 100.0e-6; #1950; icp = 0.0;
    q = 100.0e-6 * 2.0e-9;
    #2_000_000;
    v_exp = V0 + q / (C1 + C2 + C3);
    check(vctrl > v_exp - 1.0e-4 && vctrl < v_exp + 1.0e-4, $sformatf("settled %g V (exp %g)", vctrl, v_exp));
    check(dut.v1 > v_exp - 1.0e-4 && dut.v1 < v_exp + 1.0e-4, "charge-pump node settled");
    // (3) proportional offset for two R2 words
    for (int c = 0; c < 4; c += 3) begin
      lf_code = 2'(c);
      r2 = 500.0 * (c + 1);
      #2_000_000;
      v_exp = dut.v2;
      icp = 10.0e-6; #(r2 * 60.0); 
      // after 60 R2*ps the C1 transient has died (R2 C1 << that time span)
      ramp = dut.v2 - v_exp;
      dv = dut.v1 - dut.v2;
      check(dv > 0.9 * 10.0e-6 * r2 && dv < 1.1 * 10.0e-6 * r2,
            $sformatf("R2 word %0d: offset %g V (exp %g), ramp %g", c, dv, 10.0e-6 * r2, ramp));
      icp = 0.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
