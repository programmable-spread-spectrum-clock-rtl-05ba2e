// tb_sscg_workloads: the generator at its default parameters on the spread
// profiles the design targets.
//
// Runs, one after another with a 625 MHz reference: non-SSC mode, then the
// SSC cases (spread / modulation frequency) 5000 ppm / 30 kHz,
// 32500 ppm / 30 kHz, 50000 ppm / 30 kHz, 5000 ppm / 150 kHz,
// 5000 ppm / 300 kHz and the smallest spread, 2500 ppm / 300 kHz, each
// programmed with the nearest words: pro_sr = round(ppm / 2563) and
// mod_div = round(625 MHz / (336 * f_m)). For each case it lets the loop
// settle for half a modulation period, then over one full period measures
// the highest and lowest VCO frequency (mean over 128 periods of phase 0) and
// the Sel period, and checks them against 1.25 GHz, 1.25 GHz * (1 - delta)
// with delta = 168 * pro_sr / 2**16, and 2 * 168 * mod_div reference periods.
// It also reports the mean frequency, which must sit near 1 - delta/2.
// Last, at 5000 ppm / 30 kHz, it measures the rms change of the output
// period from one cycle to the next, first with the widest loop (cp_code 3,
// lf_code 3) and then with the narrowest (cp_code 0, lf_code 0). The narrow
// loop filters more of the sigma-delta modulator's phase steps, so its rms
// must be under half that of the wide loop.
module tb_sscg_workloads;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  localparam realtime T_REF = 1600.0;
  localparam int      STEPS = 168;

  logic ref_clk = 1'b0;
  logic rst_n   = 1'b0;   // low from time 0; pulsed to give the reset edge
  logic ssc_en  = 1'b0;
  logic [DIV_W-1:0] mod_div = 6'd62;
  logic [SR_W-1:0]  pro_sr  = 5'd0;
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

  realtime t_start;
  int      nedge = 0;
  real     f_meas = 0.0, f_min, f_max, f_sum;
  int      n_meas;
  logic    track = 1'b0;
  always @(posedge clk_out) begin
    if (nedge == 0) t_start = $realtime;
    nedge++;
    if (nedge == 129) begin
      f_meas  = 128.0 / (($realtime - t_start) * 1.0e-12);
      nedge   = 1;
      t_start = $realtime;
      if (track) begin
        if (f_meas < f_min) f_min = f_meas;
        if (f_meas > f_max) f_max = f_meas;
        f_sum += f_meas;
        n_meas++;
      end
    end
  end

  realtime t_sel_last = 0.0, t_sel_period = 0.0;
  always @(posedge sel) begin
    if (t_sel_last > 0.0) t_sel_period = $realtime - t_sel_last;
    t_sel_last = $realtime;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_case(int ppm, real fm_khz);
    int  sr, md;
    real delta, f_lo, tm, tol;
    sr = int'($floor(ppm / 2563.0 + 0.5));
    md = int'($floor(625.0e6 / (336.0 * fm_khz * 1.0e3) + 0.5));
    delta = (STEPS * sr) / 65536.0;
    f_lo  = 1.25e9 * (1.0 - delta);
    tm    = 2.0 * STEPS * md * T_REF;
    ssc_en = 1'b0;
    #(200_000.0);
    pro_sr = 5'(sr); mod_div = 6'(md);
    t_sel_last = 0.0; t_sel_period = 0.0;
    ssc_en = 1'b1;
    #(tm / 2.0);
    f_min = 1.0e12; f_max = 0.0; f_sum = 0.0; n_meas = 0;
    track = 1'b1;
    #(tm);
    track = 1'b0;
    #(tm / 10.0);             // the second rising edge of Sel comes 1.5 periods after enable
    tol = 0.15 * delta * 1.25e9;
    $display("%0d ppm / %0.0f kHz: pro_sr=%0d mod_div=%0d delta=%0.0f ppm f_m=%0.1f kHz | f_max %0.4f f_min %0.4f (exp %0.4f) mean %0.4f GHz, Sel period %0.1f ns",
             ppm, fm_khz, sr, md, delta * 1e6, 1.0e9 / tm, f_max / 1e9, f_min / 1e9, f_lo / 1e9, f_sum / n_meas / 1e9, t_sel_period / 1000.0);
    check(f_max > 1.25e9 - tol && f_max < 1.25e9 + tol, $sformatf("%0d ppm/%0.0f kHz: top of profile", ppm, fm_khz));
    check(f_min > f_lo - tol && f_min < f_lo + tol, $sformatf("%0d ppm/%0.0f kHz: bottom of profile", ppm, fm_khz));
    check(f_sum / n_meas > 1.25e9 * (1.0 - delta / 2.0) - tol && f_sum / n_meas < 1.25e9 * (1.0 - delta / 2.0) + tol,
          $sformatf("%0d ppm/%0.0f kHz: mean frequency", ppm, fm_khz));
    check(t_sel_period > tm - 800.0 && t_sel_period < tm + 800.0, $sformatf("%0d ppm/%0.0f kHz: modulation period", ppm, fm_khz));
  endtask

  // cycle-to-cycle change of the output period, accumulated as a sum of
  // squares while c2c_on is set
  realtime t_c0 = 0.0, t_c1 = 0.0, t_c2 = 0.0;
  real     c2c_sq = 0.0;
  int      c2c_n  = 0;
  logic    c2c_on = 1'b0;
  always @(posedge clk_out) begin
    t_c2 = t_c1;
    t_c1 = t_c0;
    t_c0 = $realtime;
    if (c2c_on && t_c2 > 0.0) begin
      c2c_sq += ((t_c0 - t_c1) - (t_c1 - t_c2)) ** 2;
      c2c_n++;
    end
  end

  // rms cycle-to-cycle period change over 10 us with the given loop words
  task automatic c2c_rms(logic [1:0] cp, logic [1:0] lf, output real rms);
    cp_code = cp;
    lf_code = lf;
    #(30_000_000.0);
    c2c_sq = 0.0; c2c_n = 0;
    c2c_on = 1'b1;
    #(10_000_000.0);
    c2c_on = 1'b0;
    rms = $sqrt(c2c_sq / c2c_n);
  endtask

  // 5000 ppm / 30 kHz with the widest and the narrowest loop: the narrow
  // loop must pass less of the modulator's noise to the output
  task automatic loop_bandwidth_noise();
    real rms_wide, rms_narrow;
    ssc_en  = 1'b0;
    #(2_000_000.0);
    pro_sr  = 5'd2;
    mod_div = 6'd62;
    ssc_en  = 1'b1;
    c2c_rms(2'd3, 2'd3, rms_wide);
    c2c_rms(2'd0, 2'd0, rms_narrow);
    $display("5000 ppm / 30 kHz: rms cycle-to-cycle period change %0.3f ps (cp_code 3, lf_code 3), %0.3f ps (cp_code 0, lf_code 0)",
             rms_wide, rms_narrow);
    check(rms_narrow < 0.5 * rms_wide, "narrow loop passes less modulator noise");
    cp_code = 2'd3;
    lf_code = 2'd1;
  endtask

  initial begin
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    #(3_000_000.0);
    f_min = 1.0e12; f_max = 0.0; f_sum = 0.0; n_meas = 0;
    track = 1'b1;
    #(2_000_000.0);
    track = 1'b0;
    $display("non-SSC: f_min %0.6f f_max %0.6f GHz", f_min / 1e9, f_max / 1e9);
    check(f_min > 1.2495e9 && f_max < 1.2505e9, "non-SSC at 1.25 GHz");
    run_case(5000, 30.0);
    run_case(32500, 30.0);
    run_case(50000, 30.0);
    run_case(5000, 150.0);
    run_case(5000, 300.0);
    run_case(2500, 300.0);
    loop_bandwidth_noise();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
