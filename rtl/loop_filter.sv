// loop_filter: behavioural model of the programmable third-order loop filter.
//
// Behavioural model, not synthesizable logic. The network is the document's:
// C1 from the charge-pump node to ground, R2 in series with C2 in parallel
// with it (the second-order filter, zero at 1/(R2 C2)), and an extra R3-C3
// section that adds a third pole to suppress the sigma-delta noise; the VCO
// is driven from C3. R2 is selected by a 2-bit word, which moves the loop
// bandwidth. The model integrates the three capacitor voltages with forward
// Euler steps of at most STEP_PS, and re-integrates at every change of the
// charge-pump current, so a current pulse is integrated over its exact width.
// The component values (R2 = (lf_code + 1) * 500 ohm, C1 = 10 pF,
// C2 = 120 pF, R3 = 1 kohm, C3 = 2 pF) are this model's choices: with a
// 100 uA pump, Kvco = 680 MHz/V and a feedback ratio of 2 they give a unity-gain
// bandwidth of about 5 MHz at lf_code = 1, more than ten times the highest
// modulation frequency (300 kHz), with about 50 degrees of phase margin.
//
// Interface: icp (real, amperes), lf_code (R2 select), vctrl (real, volts).
// All capacitors start at V_INIT.
module loop_filter #(
  parameter real     R_LSB   = 500.0,
  parameter real     C1      = 10.0e-12,
  parameter real     C2      = 120.0e-12,
  parameter real     R3      = 1000.0,
  parameter real     C3      = 2.0e-12,
  parameter real     V_INIT  = 0.6,
  parameter realtime STEP_PS = 10.0
) (
  input  real        icp,
  input  logic [1:0] lf_code,
  output real        vctrl
);

  timeunit 1ps;
  timeprecision 1fs;

  real     v1;      // charge-pump node (C1)
  real     v2;      // C2 node
  real     v3;      // C3 node, VCO control
  real     i_now;
  realtime t_last;

  initial begin
    v1 = V_INIT;
    v2 = V_INIT;
    v3 = V_INIT;
    i_now  = 0.0;
    t_last = 0.0;
  end

  // advance the state from t_last to now with the current that flowed
  task automatic advance();
    real dt, h, r2, i12, i13;
    int  n;
    dt = ($realtime - t_last) * 1.0e-12;
    t_last = $realtime;
    if (dt <= 0.0) return;
    r2 = R_LSB * real'(int'(lf_code) + 1);
    n  = int'($ceil(dt / (STEP_PS * 1.0e-12)));
    if (n < 1) n = 1;
    h  = dt / real'(n);
    for (int k = 0; k < n; k++) begin
      i12 = (v1 - v2) / r2;
      i13 = (v1 - v3) / R3;
      v1 += h * (i_now - i12 - i13) / C1;
      v2 += h * i12 / C2;
      v3 += h * i13 / C3;
    end
  endtask

  always @(icp) begin
    advance();
    i_now = icp;
  end

  always begin
    #(STEP_PS);
    advance();
  end

  assign vctrl = v3;

endmodule
