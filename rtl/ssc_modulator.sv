// ssc_modulator: the digital spread-spectrum modulation circuit.
//
// Chains the four digital blocks of the generator. The programmable divider
// divides the modulator clock by mod_div to make the CLK_tri enable; the
// triangle generator turns it and the spread-ratio word into a staircase
// triangle; the MASH 1-1 modulator turns the staircase into a stream of
// 2-bit codes whose mean is the staircase value / 2**12; the MUX controller
// integrates the codes into a one-hot selection of one of the eight VCO
// phases. Everything runs on one clock: the feedback-divider output of the
// PLL (about the reference frequency once locked). Running the triangle
// generator from an enable instead of from a separate divided clock is this
// design's choice.
//
// Modulation frequency: f_m = f_clk / (2 * STEPS * mod_div).
// Peak fraction: STEPS * pro_sr / 2**12 of one phase step per clock.
//
// Interface: clk, rst_n (async, active low), ssc_en (0 = non-SSC mode),
// mod_div (6-bit, 2..63), pro_sr (5-bit), phase_sel (one-hot S1..S8),
// sel (triangle direction, the Sel test pin), tri_val, code (observation).
// Latency from a triangle step to the phase select: 3 clocks.
module ssc_modulator
  import sscg_pkg::*;
#(
  parameter int unsigned STEPS = 168
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ssc_en,
  input  logic [DIV_W-1:0]   mod_div,
  input  logic [SR_W-1:0]    pro_sr,
  output logic [NPHASE-1:0]  phase_sel,
  output logic [PH_W-1:0]    phase_idx,
  output logic               sel,
  output logic [ACC_W-1:0]   tri_val,
  output sdm_code_e          code,
  output logic               clk_tri
);

  timeunit 1ps;
  timeprecision 1fs;

  logic tri_tick;

  prog_divider u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .n_div   (mod_div),
    .tick    (tri_tick),
    .clk_tri (clk_tri)
  );

  triangle_gen #(.STEPS(STEPS)) u_tri (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (tri_tick),
    .ssc_en  (ssc_en),
    .pro_sr  (pro_sr),
    .tri_val (tri_val),
    .sel     (sel)
  );

  mash11_sdm u_sdm (
    .clk   (clk),
    .rst_n (rst_n),
    .f     (tri_val),
    .y     (code)
  );

  mux_controller u_mc (
    .clk       (clk),
    .rst_n     (rst_n),
    .code      (code),
    .phase_idx (phase_idx),
    .phase_sel (phase_sel)
  );

endmodule
