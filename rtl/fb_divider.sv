// fb_divider: integer feedback divider of the PLL.
//
// Counts rising edges of the selected VCO phase and produces the feedback
// clock for the phase-frequency detector, one period per N input periods,
// high for the first ceil(N/2) of them. Because the input is the output of
// the phase multiplexer, each phase step taken by the MUX controller lengthens
// or shortens one divider period by 1/8 of a VCO period, which turns the
// integer ratio N into the fractional average N - mean(y)/8. The document
// names this divider but gives neither its ratio nor its circuit: N = 2 and
// the plain counter are this design's choices.
//
// Interface: clk (selected VCO phase), rst_n (async, active low), fdiv.
// fdiv rises on the input edge on which the counter wraps to 0.
module fb_divider #(
  parameter int unsigned N = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic fdiv
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;

  logic [CW-1:0] cnt, cnt_next;

  assign cnt_next = (cnt == CW'(N - 1)) ? '0 : cnt + CW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(N - 1);
      fdiv <= 1'b0;
    end else begin
      cnt  <= cnt_next;
      fdiv <= (cnt_next < CW'((N + 1) / 2));
    end
  end

endmodule
