// pfd: behavioural model of the phase-frequency detector.
//
// Behavioural model, not synthesizable logic: the real part is two true
// single-phase-clock D flip-flops with D tied high and a NOR gate that resets
// both once both outputs are high. The model keeps that structure: a rising
// edge of fref sets UP, a rising edge of fdiv sets DN, and when both are set
// they are cleared after T_RST, the delay of the reset path. In lock both
// outputs therefore pulse together for about T_RST (which avoids a dead zone),
// and otherwise the difference of the pulse widths equals the phase
// difference of the inputs. T_RST (60 ps, of the order of the gate and
// flip-flop delays of the process) is this model's choice.
//
// Interface: fref (reference clock), fdiv (feedback clock), up, dn.
module pfd #(
  parameter realtime T_RST = 60.0
) (
  input  logic fref,
  input  logic fdiv,
  output logic up,
  output logic dn
);

  timeunit 1ps;
  timeprecision 1fs;

  logic both;

  assign #(T_RST) both = up & dn;

  always @(posedge fref or posedge both)
    if (both) up <= 1'b0;
    else      up <= 1'b1;

  always @(posedge fdiv or posedge both)
    if (both) dn <= 1'b0;
    else      dn <= 1'b1;

endmodule
