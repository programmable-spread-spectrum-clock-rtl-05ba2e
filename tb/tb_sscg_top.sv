// tb_sscg_top: end-to-end test of the spread-spectrum clock generator.
//
// Drives a 625 MHz reference and takes the generator through: non-SSC mode
// (checks lock at 2 x 625 MHz = 1.25 GHz), SSC mode with the largest spread
// of the document (pro_sr = 20, about 51000 ppm) at the fastest modulation
// (mod_div = 6, about 310 kHz), a change of the loop-bandwidth words, and
// back to non-SSC mode. The VCO frequency is measured as the mean over 64
// periods of phase 0; its highest and lowest values during SSC are compared
// with 1.25 GHz and 1.25 GHz * (1 - delta), delta = 168 * pro_sr / 2**16,
// and the modulation period is measured from the Sel test pin and compared
// with 2 * 168 * mod_div reference periods. Counts every mechanism:
// each of the four sigma-delta codes, phase-index wrap-around, Sel toggles,
// divider reloads and mode switches; a mechanism that never happens is a
// failure.
module tb_sscg_top;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  localparam realtime T_REF = 1600.0;
  localparam int      STEPS = 168;

  logic ref_clk = 1'b0;
  logic rst_n   = 1'b0;   // low from time 0; pulsed to give the reset edge
  logic ssc_en  = 1'b0;
  logic [DIV_W-1:0] mod_div = 6'd6;
  logic [SR_W-1:0]  pro_sr  = 5'd20;
  logic [1:0] cp_code = 2'd3;
  logic [1:0] lf_code = 2'd1;
  logic clk_out, fdiv, sel, clk_tri;
  logic [NPHASE-1:0] vco_ph;
  real vctrl;
  logic [ACC_W-1:0] tri_val;
  sdm_code_e code;
  logic [PH_W-1:0] phase_idx;

  int checks = 0, failures = 0;

  sscg_top dut (.*);

  always #(T_REF / 2.0) ref_clk = ~ref_clk;

  // ---- frequency measurement over 64 VCO periods
  realtime t_start;
  int      nedge = 0;
  real     f_meas = 0.0;
  real     f_min = 1.0e12, f_max = 0.0;
  logic    track = 1'b0;
  always @(posedge clk_out) begin
    if (nedge == 0) t_start = $realtime;
    nedge++;
    if (nedge == 65) begin
      f_meas = 64.0 / (($realtime - t_start) * 1.0e-12);
      nedge  = 1;
      t_start = $realtime;
      if (track) begin
        if (f_meas < f_min) f_min = f_meas;
        if (f_meas > f_max) f_max = f_meas;
      end
    end
  end

  // ---- mechanism counters
  int n_code[4];
  int n_wrap = 0, n_sel = 0, n_reload = 0, n_mode = 0;
  logic [PH_W-1:0] idx_q = '0;
  always @(posedge fdiv) if (rst_n) begin
    n_code[code]++;
    if ((idx_q == 3'd7 && phase_idx == 3'd0) || (idx_q <= 3'd1 && phase_idx >= 3'd6)) n_wrap++;
    idx_q <= phase_idx;
    if (dut.u_mod.u_div.tick) n_reload++;
  end
  realtime t_sel_last = 0.0, t_sel_period = 0.0;
  always @(posedge sel) begin
    if (t_sel_last > 0.0) t_sel_period = $realtime - t_sel_last;
    t_sel_last = $realtime;
  end
  always @(sel) n_sel++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_ns(real ns);
    #(ns * 1000.0);
  endtask

  real delta, f_lo_exp, tm_exp;
  int  sr_i, md_i;

  initial begin
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    // non-SSC: lock to 1.25 GHz
    wait_ns(3000);
    $display("non-SSC: f = %0.6f GHz vctrl = %0.4f", f_meas / 1e9, vctrl);
    check(f_meas > 1.2490e9 && f_meas < 1.2510e9, "non-SSC lock at 1.25 GHz");
    // SSC, largest spread, fastest modulation
    ssc_en = 1'b1; n_mode++;
    wait_ns(4000);
    track = 1'b1;
    wait_ns(7000);
    track = 1'b0;
    sr_i     = pro_sr;
    md_i     = mod_div;
    delta    = (STEPS * sr_i) / 65536.0;
    f_lo_exp = 1.25e9 * (1.0 - delta);
    tm_exp   = 2.0 * STEPS * md_i * T_REF;
    $display("SSC: f_max = %0.6f GHz f_min = %0.6f GHz (expected %0.6f) Sel period %0.1f ns (expected %0.1f)",
             f_max / 1e9, f_min / 1e9, f_lo_exp / 1e9, t_sel_period / 1000.0, tm_exp / 1000.0);
    check(f_max > 1.2480e9 && f_max < 1.2530e9, "SSC top of profile at 1.25 GHz");
    check(f_min > f_lo_exp - 0.15 * delta * 1.25e9 && f_min < f_lo_exp + 0.15 * delta * 1.25e9,
          "SSC bottom of profile at (1 - delta) * 1.25 GHz");
    check(t_sel_period > tm_exp - 800.0 && t_sel_period < tm_exp + 800.0, "modulation period");
    // change loop bandwidth words, back to non-SSC
    cp_code = 2'd1; lf_code = 2'd2; n_mode++;
    ssc_en = 1'b0;
    wait_ns(4000);
    $display("non-SSC again: f = %0.6f GHz", f_meas / 1e9);
    check(f_meas > 1.2490e9 && f_meas < 1.2510e9, "non-SSC relock at 1.25 GHz");
    $display("codes hold/left1/left2/right1 = %0d/%0d/%0d/%0d wraps=%0d sel=%0d reloads=%0d modes=%0d",
             n_code[0], n_code[1], n_code[2], n_code[3], n_wrap, n_sel, n_reload, n_mode);
    for (int k = 0; k < 4; k++) check(n_code[k] > 0, $sformatf("code %0d seen", k));
    check(n_wrap > 0, "phase index wrap-around");
    check(n_sel > 1, "Sel toggles");
    check(n_reload > 0, "divider reload");
    check(n_mode == 2, "mode switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(30_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
