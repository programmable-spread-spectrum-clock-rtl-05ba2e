// vco: behavioural model of the 8-phase ring oscillator.
//
// Behavioural model, not synthesizable logic. Four differential delay cells
// (vco_delay_cell) form a ring that is closed with a crossed pair, so the
// ring inverts once per trip and one edge travels round it: the period is
// eight cell delays, and the four differential outputs give eight phases
// spaced by 1/8 of the period. ph[k] is the true output of cell k and
// ph[k+4] its complement, for k = 0..3. The tuning law is linear,
// f = F0 + KVCO * (vctrl - V0).
//
// The four-stage fully differential ring, the eight phases, F0 = 1.25 GHz and
// KVCO = 680 MHz/V follow the document. The document's cells also have a
// negative-skewed second input path that raises the top frequency; here it
// is folded into the cell delay. V0 = 0.6 V and the frequency floor F_MIN
// are this model's choices.
//
// Interface: vctrl (real, volts), ph[7:0] (ph[k] lags ph[0] by k/8 period,
// 50 % duty). A change of vctrl acts on each cell at its next input edge.
module vco #(
  parameter real F0    = 1.25e9,
  parameter real KVCO  = 680.0e6,
  parameter real V0    = 0.6,
  parameter real F_MIN = 0.5e9
) (
  input  real        vctrl,
  output logic [7:0] ph
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int NSTAGE = 4;

  logic [NSTAGE-1:0] sp, sn;   // true and complement outputs of each cell
  logic [NSTAGE-1:0] ip, in;   // differential inputs of each cell

  // cell 0 takes the last cell crossed; the others take their predecessor
  assign ip[0] = sn[NSTAGE-1];
  assign in[0] = sp[NSTAGE-1];
  for (genvar k = 1; k < NSTAGE; k++) begin : g_link
    assign ip[k] = sp[k-1];
    assign in[k] = sn[k-1];
  end

  for (genvar k = 0; k < NSTAGE; k++) begin : g_cell
    vco_delay_cell #(
      .F0(F0), .KVCO(KVCO), .V0(V0), .F_MIN(F_MIN), .NSTAGE(NSTAGE)
    ) u_cell (
      .in_p (ip[k]),
      .in_n (in[k]),
      .vctrl(vctrl),
      .out_p(sp[k]),
      .out_n(sn[k])
    );
  end

  assign ph = {sn, sp};

endmodule
