// charge_pump: behavioural model of the programmable charge pump.
//
// Behavioural model, not synthesizable logic: the real part has two current
// sources, four switches, a unity-gain buffer that keeps the idle current
// sources at the output voltage (against charge sharing), and a biasing
// current mirror whose current a 2-bit word programs through a small DAC.
// The model gives the net current into the loop filter: +I while only UP is
// on, -I while only DN is on, 0 otherwise, with I = (cp_code + 1) * I_LSB.
// The 2-bit programming follows the document; the 25 uA step is this model's
// choice (the document gives no current values). Mismatch and charge sharing
// are not modelled.
//
// Interface: up, dn (from the PFD), cp_code (2-bit current word),
// icp (real, amperes, positive into the filter).
module charge_pump #(
  parameter real I_LSB = 25.0e-6
) (
  input  logic       up,
  input  logic       dn,
  input  logic [1:0] cp_code,
  output real        icp
);

  timeunit 1ps;
  timeprecision 1fs;

  real i_set;

  always_comb begin
    i_set = I_LSB * real'(int'(cp_code) + 1);
    icp   = (up ? i_set : 0.0) - (dn ? i_set : 0.0);
  end

endmodule
