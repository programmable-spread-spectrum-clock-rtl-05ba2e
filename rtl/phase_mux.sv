// phase_mux: behavioural model of the 8-to-1 clock phase multiplexer.
//
// Behavioural model of a custom circuit: the real part is built from two
// 4-to-1 and one 2-to-1 dynamic multiplexers whose internal nodes are
// precharged by extra PMOS transistors while the phase inputs are low, which
// limits charge sharing and jitter. Logically the one-hot word S1..S8 picks
// one of the eight VCO phases; the model keeps the two-level structure.
//
// The select path has a delay T_SEL (flip-flop plus gate delay, 165 ps, this
// model's choice from the process's typical DFF and gate delays). It matters:
// a new select word is issued on the rising edge of the selected phase, and
// it must take effect in the window where the current phase, the next-later
// phase and the two earlier phases are all high (between 1/8 and 1/4 of a VCO
// period after that edge), or the output glitches. With T_SEL in that window
// every step of -2, -1, 0 or +1 phases is glitch-free.
//
// Interface: ph[7:0] (VCO phases), phase_sel[7:0] (one-hot, S1 = bit 0),
// clk_out (selected phase).
module phase_mux #(
  parameter realtime T_SEL = 165.0
) (
  input  logic [7:0] ph,
  input  logic [7:0] phase_sel,
  output logic       clk_out
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0] sel_d;
  logic       lo, hi;

  initial sel_d = 8'b0000_0001;

  always @(phase_sel) sel_d <= #(T_SEL) phase_sel;

  assign lo      = |(ph[3:0] & sel_d[3:0]);   // first 4-to-1 mux
  assign hi      = |(ph[7:4] & sel_d[7:4]);   // second 4-to-1 mux
  assign clk_out = (|sel_d[7:4]) ? hi : lo;   // 2-to-1 mux

endmodule
