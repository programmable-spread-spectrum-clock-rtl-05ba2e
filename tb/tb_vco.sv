// tb_vco: self-checking test of the 8-phase VCO model.
//
// At three control voltages checks the period of phase 0 against
// 1 / (1.25 GHz + 680 MHz/V * (vctrl - 0.6 V)), that phase k rises k/8 of a
// period after phase 0, and that every phase has a 50 % duty cycle.
module tb_vco;

  timeunit 1ps;
  timeprecision 1fs;

  real        vctrl = 0.6;
  logic [7:0] ph;
  int checks = 0, failures = 0;

  vco dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t_rise[8], t_fall[8], t_prev0;
  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge ph[k]) t_rise[k] = $realtime;
    always @(negedge ph[k]) t_fall[k] = $realtime;
  end

  initial begin
    static real v_tab[3] = '{0.6, 0.5, 0.7};
    real f, tp, per, d;
    foreach (v_tab[i]) begin
      vctrl = v_tab[i];
      f  = 1.25e9 + 680.0e6 * (vctrl - 0.6);
      tp = 1.0e12 / f;
      repeat (4) @(posedge ph[0]);
      t_prev0 = $realtime;
      @(posedge ph[0]);
      per = $realtime - t_prev0;
      check(per > tp - 0.01 && per < tp + 0.01, $sformatf("vctrl %0.2f period %0.3f ps (exp %0.3f)", vctrl, per, tp));
      @(posedge ph[7]);
      #1;
      for (int k = 1; k < 8; k++) begin
        d = t_rise[k] - t_prev0 - per;   // phase k after the latest phase-0 edge
        check(d > k * tp / 8.0 - 0.01 && d < k * tp / 8.0 + 0.01, $sformatf("phase %0d offset %0.3f", k, d));
      end
      for (int k = 0; k < 4; k++) begin
        d = t_fall[k] - t_rise[k];
        if (d < 0.0) d += tp;
        check(d > tp / 2.0 - 0.01 && d < tp / 2.0 + 0.01, $sformatf("phase %0d high time %0.3f", k, d));
      end
    end
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
