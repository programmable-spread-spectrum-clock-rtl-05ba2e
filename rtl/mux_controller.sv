// mux_controller: converts sigma-delta codes into a one-hot phase select.
//
// A 3-bit accumulator holds the index of the VCO phase in use. Each clock it
// adds the phase step of the modulator code (hold, one left, two left, one
// right; left = earlier phase) modulo 8, and a decoder turns the index into
// the one-hot MUX control word S1..S8 (index 000 -> S1, ..., 111 -> S8).
// The code-to-step table and the index-to-one-hot table are the document's;
// registering the one-hot word (so the clock multiplexer sees glitch-free
// select lines) and the reset to phase 0 are this design's choices.
//
// Interface: clk (the feedback-divider clock), rst_n (async, active low),
// code (sdm_code_e), phase_idx (accumulator), phase_sel[0] = S1 ...
// phase_sel[7] = S8. Both outputs change on the clock edge that samples code.
module mux_controller
  import sscg_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  sdm_code_e           code,
  output logic [PH_W-1:0]     phase_idx,
  output logic [NPHASE-1:0]   phase_sel
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [PH_W-1:0] idx_next;

  assign idx_next = phase_idx + PH_W'(code_to_shift(code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_idx <= '0;
      phase_sel <= NPHASE'(1);
    end else begin
      phase_idx <= idx_next;
      phase_sel <= NPHASE'(1) << idx_next;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(phase_sel))
    else $error("mux_controller: select is not one-hot");

endmodule
