// vco_delay_cell: behavioural model of one differential delay cell of the VCO
// ring.
//
// Behavioural model, not synthesizable logic. The real cell is a
// four-input differential stage: it is driven by the previous stage
// (the normal path) and by the stage before that (the negative-skewed path),
// and a cross-coupled latch whose strength is set by the control voltage
// trims its delay. This model keeps what the ring needs from the cell: the
// differential output follows the differential input after a delay that
// depends on vctrl. The delay is set so that a ring of NSTAGE cells runs at
// f = F0 + KVCO * (vctrl - V0), i.e. d = 1 / (2 * NSTAGE * f); the effect of
// the skewed path is folded into that number. Each edge uses the control
// voltage at the moment the input changes (transport delay), so edges already
// in flight are not disturbed by a later change of vctrl.
//
// Interface: in_p/in_n differential input, out_p/out_n differential output,
// vctrl (real, volts). The output starts low (out_p = 0); the input is
// sampled once more 1 ps after time zero so that the ring starts from a
// known state with a single edge travelling round it.
//
// q carries a declaration initial value and is then assigned by the always
// block: the value is in place before any process runs, which keeps a
// second edge from entering the ring at time zero. The delay is computed at
// run time, so a tool cannot prove it non-zero; F_MIN bounds it to at most
// 1 / (2 * NSTAGE * F_MIN) and it is always positive.
module vco_delay_cell #(
  parameter real F0     = 1.25e9,
  parameter real KVCO   = 680.0e6,
  parameter real V0     = 0.6,
  parameter real F_MIN  = 0.5e9,
  parameter int  NSTAGE = 4
) (
  input  logic in_p,
  input  logic in_n,
  input  real  vctrl,
  output logic out_p,
  output logic out_n
);

  timeunit 1ps;
  timeprecision 1fs;

  logic q     = 1'b0;
  logic start = 1'b0;

  initial #1 start = 1'b1;

  function automatic real stage_delay(real v);
    real f;
    f = F0 + KVCO * (v - V0);
    if (f < F_MIN) f = F_MIN;
    return 1.0e12 / (2.0 * NSTAGE * f);
  endfunction

  // the cell switches to the side the differential input points to
  always @(in_p or in_n or posedge start)
    q <= #(stage_delay(vctrl)) (in_p & ~in_n);

  assign out_p = q;
  assign out_n = ~q;

endmodule
