// prog_divider: 6-bit programmable frequency divider that sets the
// modulation frequency.
//
// A countdown counter is loaded with the division ratio N and decremented on
// every input clock. An end-of-count detector watches for the terminal state
// 000010 and raises Reload; one clock later, with the counter at 1, the reload
// circuit loads N again. The counter therefore walks N, N-1, ..., 2, 1 and
// the output repeats every N input clocks, f_tri = f_in / N, for N = 2..63.
// The counter, terminal state and reload path follow the document's divider;
// detecting 2 rather than 1 gives the reload register its one clock of
// latency.
//
// Interface: clk / rst_n (asynchronous, active low), n_div (ratio, sampled at
// each reload, values below 2 are treated as 2), tick (one-clock pulse per
// output period, used as the CLK_tri enable), clk_tri (output clock, high for
// the first half of each period).
// Timing: the first tick comes N clocks after reset is released; a new n_div
// takes effect at the next reload.
module prog_divider
  import sscg_pkg::*;
#(
  parameter int unsigned W = DIV_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] n_div,
  output logic         tick,
  output logic         clk_tri
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] cnt;
  logic [W-1:0] n_eff;
  logic         eoc;
  logic         reload;

  assign n_eff = (n_div < W'(2)) ? W'(2) : n_div;
  assign eoc   = (cnt == W'(2));           // end-of-count detector: 000010

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      reload <= 1'b1;                      // load N on the first clock
    end else begin
      reload <= eoc;
      if (reload) cnt <= n_eff;
      else        cnt <= cnt - W'(1);
    end
  end

  assign tick    = reload;
  assign clk_tri = (cnt > (n_eff >> 1));   // high for the upper half of the count

endmodule
