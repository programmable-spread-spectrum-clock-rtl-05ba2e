// triangle_gen: programmable triangle generator (staircase modulation profile).
//
// An accumulator and a counter. On every CLK_tri enable the accumulator adds
// the spread-ratio word Pro_S.R. while Sel is low and subtracts it while Sel
// is high; the counter counts enables and toggles Sel each time it has counted
// STEPS of them. The result is a discrete staircase triangle from 0 up to
// STEPS * pro_sr and back, with period 2 * STEPS enables. The step height sets
// the frequency deviation (spread ratio); the enable rate, set by the
// programmable divider, sets the modulation frequency. This is the document's
// structure; STEPS (the "fixed count number" of the counter), the start at 0
// with Sel low, and the ssc_en clear are this design's choices.
//
// Interface: clk, rst_n (async, active low), en (one-clock CLK_tri enable),
// ssc_en (0 = non-SSC mode: value, counter and Sel are held at 0),
// pro_sr (step height), tri_val (ACC_W-bit staircase, registered), sel
// (direction; low = rising). Timing: tri_val and sel change on the clock edge
// that samples en. pro_sr should be changed only while ssc_en is low.
// STEPS * pro_sr must stay below 2**ACC_W; an assertion checks it.
module triangle_gen
  import sscg_pkg::*;
#(
  parameter int unsigned STEPS = 168,
  parameter int unsigned W     = ACC_W,
  parameter int unsigned SRW   = SR_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           ssc_en,
  input  logic [SRW-1:0] pro_sr,
  output logic [W-1:0]   tri_val,
  output logic           sel
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(STEPS + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tri_val <= '0;
      cnt     <= '0;
      sel     <= 1'b0;
    end else if (!ssc_en) begin
      tri_val <= '0;
      cnt     <= '0;
      sel     <= 1'b0;
    end else if (en) begin
      if (!sel) tri_val <= tri_val + W'(pro_sr);
      else      tri_val <= tri_val - W'(pro_sr);
      if (cnt == CW'(STEPS - 1)) begin
        cnt <= '0;
        sel <= ~sel;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

  // The peak of the staircase must fit the accumulator.
  a_peak_fits: assert property (@(posedge clk) disable iff (!rst_n)
      ssc_en |-> (STEPS * pro_sr < (1 << W)))
    else $error("triangle_gen: STEPS*pro_sr overflows the accumulator");

endmodule
