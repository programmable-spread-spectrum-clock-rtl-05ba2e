// tb_ssc_modulator: self-checking test of the digital modulation chain.
//
// With mod_div = 3 and pro_sr = 20 (the largest spread of the document) the
// Sel output must toggle every 168 * 3 clocks and the staircase must peak at
// 168 * 20. The phase index, unwrapped, must move left by the running sum of
// the staircase / 4096, three clocks later, within 2 phase steps (the chain
// only adds the bounded, shaped quantisation error). The select word must be
// the one-hot code of the index. In non-SSC mode the phase must never move.
// A change of mod_div to 7 must change the Sel half-period to 168 * 7.
module tb_ssc_modulator;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  localparam int STEPS = 168;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        ssc_en = 1'b0;
  logic [5:0]  mod_div = 6'd3;
  logic [4:0]  pro_sr = 5'd20;
  logic [7:0]  phase_sel;
  logic [2:0]  phase_idx;
  logic        sel;
  logic [11:0] tri_val;
  sdm_code_e   code;
  logic        clk_tri;
  int checks = 0, failures = 0;

  ssc_modulator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unwrapped, tri_sum;
  longint tri_hist[$];
  int     prev_idx, peak, last_sel_cyc, cyc, n_half;

  task automatic run(int ncyc, int md, bit check_period);
    int d;
    longint err;
    for (int i = 0; i < ncyc; i++) begin
      logic sel_q;
      sel_q = sel;
      @(posedge clk); #1;
      cyc++;
      d = (int'(phase_idx) - prev_idx + 8) % 8;
      if (d > 4) d -= 8;
      unwrapped += d;
      prev_idx = phase_idx;
      check(phase_sel == 8'(1 << phase_idx), "one-hot select matches index");
      tri_hist.push_back(tri_val);
      if (tri_hist.size() > 3) tri_sum += tri_hist.pop_front();
      err = -unwrapped * 4096 - tri_sum;
      if (ssc_en) check(err < 2 * 4096 && err > -2 * 4096, $sformatf("phase drift error %0d/4096", err));
      else        check(d == 0, "non-SSC: phase holds");
      if (int'(tri_val) > peak) peak = tri_val;
      if (sel != sel_q) begin
        if (check_period && n_half > 0)
          check(cyc - last_sel_cyc == STEPS * md, $sformatf("Sel half-period %0d", cyc - last_sel_cyc));
        n_half++;
        last_sel_cyc = cyc;
      end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    unwrapped = 0; tri_sum = 0; prev_idx = 0; peak = 0; cyc = 0; n_half = 0;
    run(200, 3, 1'b0);                      // non-SSC
    ssc_en = 1'b1;
    run(2 * 2 * STEPS * 3 + 10, 3, 1'b1);   // two triangle periods
    check(peak == STEPS * 20, $sformatf("peak %0d", peak));
    check(n_half >= 4, "Sel toggled");
    mod_div = 6'd7; n_half = 0;
    run(2 * STEPS * 7 + 2 * STEPS * 3 + 10, 7, 1'b0);
    n_half = 0;
    run(2 * STEPS * 7 + 10, 7, 1'b1);
    check(n_half >= 2, "Sel toggled at new rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
