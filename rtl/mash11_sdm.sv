// mash11_sdm: modified second-order MASH 1-1 sigma-delta modulator.
//
// Two first-order error-feedback accumulators in cascade. Stage 1 adds the
// fractional input f to its residue; its carry is the 1-bit quantised output
// and its W-bit residue is the (negated) quantisation error. Stage 2
// accumulates stage 1's registered residue. The error-cancellation network
// combines the carries as y = c1(n-1) + c2(n) - c2(n-1), which removes stage
// 1's error and leaves stage 2's error shaped by (1 - z^-1)^2. The output is
// registered, so the transfer function is Y = f z^-2 + (1 - z^-1)^2 E2, the
// form the document gives for its modified modulator: the signal is delayed
// by two clocks, the noise shaping is unchanged. The mean of y equals
// f / 2**W; y takes the values -1, 0, 1, 2 and is sent as a 2-bit code
// (y modulo 4, see sscg_pkg). The pipelining of stage 2 on the registered
// residue is this design's reading of the modified structure.
//
// Interface: clk, rst_n (async, active low, clears all state), f (unsigned
// fraction in units of 2**-W), y (sdm_code_e, registered). One output per
// clock; a step on f reaches the mean of y two clocks later.
module mash11_sdm
  import sscg_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [W-1:0] f,
  output sdm_code_e  y
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] acc1, acc2;
  logic [W:0]   sum1, sum2;
  logic         c1, c2, c1_q, c2_q;
  logic [1:0]   y_next;

  assign sum1 = {1'b0, acc1} + {1'b0, f};
  assign sum2 = {1'b0, acc2} + {1'b0, acc1};
  assign c1   = sum1[W];
  assign c2   = sum2[W];

  // error cancellation: c1 z^-1 + c2 (1 - z^-1)
  // (taken modulo 4, which is the 2-bit output code)
  always_comb y_next = 2'({1'b0, c1_q} + {1'b0, c2} - {1'b0, c2_q});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0;
      acc2 <= '0;
      c1_q <= 1'b0;
      c2_q <= 1'b0;
      y    <= SDM_HOLD;
    end else begin
      acc1 <= sum1[W-1:0];
      acc2 <= sum2[W-1:0];
      c1_q <= c1;
      c2_q <= c2;
      y    <= sdm_code_e'(y_next);
    end
  end

endmodule
