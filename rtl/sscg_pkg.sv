// sscg_pkg: widths and codes shared by the spread-spectrum clock generator.
//
// The modulator chain runs on 12-bit words (the width of the full adder the
// design budgets its timing on), takes a 5-bit spread-ratio word and a 6-bit
// modulation-frequency word, and steers an 8-phase VCO. The 2-bit sigma-delta
// output code and its meaning for the phase selector follow the output state
// table of the modulator: 11 shifts one phase right (later), 00 holds, 01
// shifts one phase left (earlier), 10 shifts two phases left. Read as a number,
// the code is the modulator output y (range -1..2) modulo 4, and the phase
// moves by -y.
package sscg_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ACC_W  = 12;  // sigma-delta / triangle word width
  localparam int unsigned SR_W   = 5;   // spread-ratio programming word
  localparam int unsigned DIV_W  = 6;   // modulation-frequency divider word
  localparam int unsigned NPHASE = 8;   // VCO phases
  localparam int unsigned PH_W   = 3;   // log2(NPHASE)

  typedef enum logic [1:0] {
    SDM_HOLD   = 2'b00,  // y =  0 : hold phase
    SDM_LEFT1  = 2'b01,  // y = +1 : shift left 1 phase
    SDM_LEFT2  = 2'b10,  // y = +2 : shift left 2 phases
    SDM_RIGHT1 = 2'b11   // y = -1 : shift right 1 phase
  } sdm_code_e;

  // Phase step (in units of 1/8 VCO period, positive = later phase) that a
  // modulator code asks for.
  function automatic logic signed [PH_W-1:0] code_to_shift(sdm_code_e c);
    unique case (c)
      SDM_HOLD:   return 3'sd0;
      SDM_LEFT1:  return -3'sd1;
      SDM_LEFT2:  return -3'sd2;
      default:    return 3'sd1;
    endcase
  endfunction

endpackage
