// tb_sscg_spectrum: peak spectral reduction of the spread clock.
//
// Runs the generator at its default parameters with a 625 MHz reference,
// first in non-SSC mode and then in five spread cases: 5127 ppm at 30, 155
// and 310 kHz, and 33326 and 51270 ppm at 30 kHz. In each mode it records
// the times t_k of the rising edges of the output clock over one modulation
// period T_w = 336 * mod_div reference periods. The fundamental of a clock
// whose k-th rising edge is at t_k is exp(j 2 pi k) at those instants, so
// its Fourier transform over the window is approximated by
//   X(f) = sum_k exp(-j 2 pi f t_k) * (t_(k+1) - t_k),
// evaluated on a grid of step f_m / 4 (a quarter of the 1 / T_w resolution
// bandwidth) through 1.25 GHz, across the spread band. An unspread clock
// gives a peak equal to the captured span, which the non-SSC run checks, so
// the peak reduction of a spread case is 20 log10(span / peak |X|). Each case
// must lie between 6 dB under and 1 dB over the estimate
// 10 log10(delta * f0 / f_m), and the reduction must grow with the spread
// ratio and fall with the modulation frequency. Between cases ssc_en is
// dropped for 2 us so that each profile starts from zero.
module tb_sscg_spectrum;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  localparam realtime T_REF = 1600.0;
  localparam real     PI    = 3.14159265358979;

  logic ref_clk = 1'b0;
  logic rst_n   = 1'b0;   // low from time 0; pulsed to give the reset edge
  logic ssc_en  = 1'b0;
  logic [DIV_W-1:0] mod_div = 6'd62;
  logic [SR_W-1:0]  pro_sr  = 5'd2;
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real  t_edge[$];
  logic capture = 1'b0;
  always @(posedge clk_out) if (capture) t_edge.push_back($realtime * 1.0e-12);

  // peak |X(f)| over [f_lo, f_hi] on a grid of step df through 1.25 GHz;
  // also returns where it is
  task automatic peak_spectrum(real f_lo, real f_hi, real df, output real pk, output real f_pk);
    real re, im, w, a, mag;
    pk = 0.0; f_pk = 0.0;
    for (int n = int'($floor((f_lo - 1.25e9) / df)); n <= int'($ceil((f_hi - 1.25e9) / df)); n++) begin
      real f;
      f  = 1.25e9 + n * df;
      re = 0.0; im = 0.0;
      for (int k = 0; k + 1 < t_edge.size(); k++) begin
        w  = t_edge[k + 1] - t_edge[k];
        a  = 2.0 * PI * (f * t_edge[k] - $floor(f * t_edge[k]));
        re += w * $cos(a);
        im -= w * $sin(a);
      end
      mag = $sqrt(re * re + im * im);
      if (mag > pk) begin pk = mag; f_pk = f; end
    end
  endtask

  // captured span; the peak of an unspread clock over the same span
  function automatic real span();
    return t_edge[t_edge.size() - 1] - t_edge[0];
  endfunction

  real tw, pk0, f0, pk1, f1, ref0;
  real red_db[5], est_db[5];
  int  sr_tab[5] = '{2, 13, 20, 2, 2};
  int  md_tab[5] = '{62, 62, 62, 12, 6};

  // one spread case: program it from a clean start, let one half period pass,
  // capture one modulation period and measure the peak reduction
  task automatic run_case(int i);
    real fm, delta;
    fm    = 625.0e6 / (336.0 * md_tab[i]);
    delta = 168.0 * sr_tab[i] / 65536.0;
    tw    = 336.0 * md_tab[i] * T_REF;
    ssc_en  = 1'b0;
    #(2_000_000.0);
    pro_sr  = 5'(sr_tab[i]);
    mod_div = 6'(md_tab[i]);
    ssc_en  = 1'b1;
    #(tw / 2.0);
    t_edge.delete();
    capture = 1'b1;
    #(tw);
    capture = 1'b0;
    peak_spectrum(1.25e9 * (1.0 - delta) - 2.0 * fm, 1.25e9 + 2.0 * fm, fm / 4.0, pk1, f1);
    red_db[i] = 20.0 * $log10(span() / pk1);
    est_db[i] = 10.0 * $log10(delta * 1.25e9 / fm);
    $display("SSC %0d ppm / %0.1f kHz: peak at %0.6f GHz, peak reduction %0.1f dB (estimate %0.1f dB)",
             int'(delta * 1.0e6 + 0.5), fm / 1.0e3, f1 / 1e9, red_db[i], est_db[i]);
    check(red_db[i] > est_db[i] - 6.0 && red_db[i] < est_db[i] + 1.0,
          $sformatf("peak reduction within 6 dB under the estimate (case %0d)", i));
  endtask

  initial begin
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    tw = 336.0 * 62.0 * T_REF;
    #(3_000_000.0);
    capture = 1'b1;
    #(tw);
    capture = 1'b0;
    peak_spectrum(1.2490e9, 1.2510e9, 7.5e3, pk0, f0);
    ref0 = span();
    $display("non-SSC: peak |X| = %g at %0.6f GHz (%0d edges, span %g)", pk0, f0 / 1e9, t_edge.size(), ref0);
    check(f0 > 1.25e9 - 8.0e3 && f0 < 1.25e9 + 8.0e3, "unspread peak at 1.25 GHz");
    check(pk0 > 0.99 * ref0 && pk0 <= 1.0001 * ref0, "unspread peak equals the captured span");
    for (int i = 0; i < 5; i++) run_case(i);
    // the reduction grows with the spread ratio and falls with f_m
    check(red_db[1] > red_db[0] + 3.0, "32500 ppm spreads more than 5000 ppm");
    check(red_db[2] > red_db[1], "50000 ppm spreads more than 32500 ppm");
    check(red_db[3] < red_db[0] - 3.0, "150 kHz spreads less than 30 kHz");
    check(red_db[4] < red_db[3], "300 kHz spreads less than 150 kHz");
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
