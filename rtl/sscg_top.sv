// sscg_top: programmable spread-spectrum clock generator.
//
// An integer-N charge-pump PLL with an 8-phase VCO (1.25 GHz) whose feedback
// path runs through a phase multiplexer. The digital modulator, clocked by
// the feedback clock, builds a staircase triangle (programmable height and
// period), turns it into 2-bit sigma-delta codes and integrates those into a
// one-hot phase selection. Every step to an earlier phase shortens one
// feedback period by 1/8 of a VCO period, so the effective feedback ratio is
// N_FB - mean(y)/8 and the output frequency is pulled down by the triangle:
// a down-spread with triangular profile. With ssc_en low (or pro_sr = 0)
// the phase never moves and the PLL is a plain integer-N synthesiser,
// f_out = N_FB * f_ref.
//
// Spread ratio:        delta = STEPS * pro_sr / (2**12 * 8 * N_FB)
//                      (about 2560 ppm per pro_sr step at the defaults)
// Modulation frequency: f_m  = f_ref / (2 * STEPS * mod_div)
//
// The digital blocks are synthesizable; the PFD, charge pump, loop filter,
// VCO and phase multiplexer are behavioural models, so this top is for
// simulation. The block structure follows the document's architecture; the
// feedback ratio N_FB = 2 (reference 625 MHz), the STEPS = 168 triangle
// length and all analog values are this design's choices.
//
// Interface: ref_clk, rst_n (async, active low, digital state), ssc_en,
// mod_div (6-bit), pro_sr (5-bit), cp_code / lf_code (2-bit charge-pump
// current and loop-filter resistor words), clk_out (VCO phase 0), vco_ph,
// fdiv (feedback clock), sel (triangle direction test pin), vctrl, and the
// modulator observation outputs (tri_val, code, phase_idx, clk_tri).
module sscg_top
  import sscg_pkg::*;
#(
  parameter int unsigned N_FB  = 2,
  parameter int unsigned STEPS = 168
) (
  input  logic               ref_clk,
  input  logic               rst_n,
  input  logic               ssc_en,
  input  logic [DIV_W-1:0]   mod_div,
  input  logic [SR_W-1:0]    pro_sr,
  input  logic [1:0]         cp_code,
  input  logic [1:0]         lf_code,
  output logic               clk_out,
  output logic [NPHASE-1:0]  vco_ph,
  output logic               fdiv,
  output logic               sel,
  output real                vctrl,
  output logic [ACC_W-1:0]   tri_val,
  output sdm_code_e          code,
  output logic [PH_W-1:0]    phase_idx,
  output logic               clk_tri
);

  timeunit 1ps;
  timeprecision 1fs;

  logic              up, dn;
  real               icp;
  logic              mux_clk;
  logic [NPHASE-1:0] phase_sel;

  pfd u_pfd (
    .fref (ref_clk),
    .fdiv (fdiv),
    .up   (up),
    .dn   (dn)
  );

  charge_pump u_cp (
    .up      (up),
    .dn      (dn),
    .cp_code (cp_code),
    .icp     (icp)
  );

  loop_filter u_lf (
    .icp     (icp),
    .lf_code (lf_code),
    .vctrl   (vctrl)
  );

  vco u_vco (
    .vctrl (vctrl),
    .ph    (vco_ph)
  );

  phase_mux u_mux (
    .ph        (vco_ph),
    .phase_sel (phase_sel),
    .clk_out   (mux_clk)
  );

  fb_divider #(.N(N_FB)) u_fbdiv (
    .clk   (mux_clk),
    .rst_n (rst_n),
    .fdiv  (fdiv)
  );

  ssc_modulator #(.STEPS(STEPS)) u_mod (
    .clk       (fdiv),
    .rst_n     (rst_n),
    .ssc_en    (ssc_en),
    .mod_div   (mod_div),
    .pro_sr    (pro_sr),
    .phase_sel (phase_sel),
    .phase_idx (phase_idx),
    .sel       (sel),
    .tri_val   (tri_val),
    .code      (code),
    .clk_tri   (clk_tri)
  );

  assign clk_out = vco_ph[0];

endmodule
