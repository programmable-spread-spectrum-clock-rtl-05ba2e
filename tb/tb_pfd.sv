// tb_pfd: self-checking test of the phase-frequency detector model.
//
// Applies two 1.6 ns clocks with a set of phase offsets (reference leading
// and lagging) and measures the UP and DN pulse widths: the leading input's
// pulse must be the offset plus the reset delay, the other pulse the reset
// delay alone, so their difference equals the phase difference. With a
// frequency difference only one output may pulse more often.
module tb_pfd;

  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T     = 1600.0;
  localparam realtime T_RST = 60.0;

  logic fref = 1'b0, fdiv = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;

  pfd dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t_up, t_dn, w_up, w_dn;
  int n_up = 0, n_dn = 0;
  always @(posedge up) begin t_up = $realtime; n_up++; end
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) begin t_dn = $realtime; n_dn++; end
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic pair(realtime offs);   // offs > 0: fref leads
    realtime a, b;
    a = (offs > 0.0) ? 0.0 : -offs;
    b = (offs > 0.0) ? offs : 0.0;
    fork
      begin #(a); fref = 1'b1; #(T / 2.0); fref = 1'b0; end
      begin #(b); fdiv = 1'b1; #(T / 2.0); fdiv = 1'b0; end
    join
    #(T / 2.0 - ((offs > 0.0) ? offs : -offs));
  endtask

  initial begin
    realtime offs_tab[6] = '{0.0, 25.0, 200.0, -40.0, -300.0, 500.0};
    #100;
    foreach (offs_tab[i]) begin
      repeat (3) pair(offs_tab[i]);
      check(w_up - w_dn > offs_tab[i] - 0.01 && w_up - w_dn < offs_tab[i] + 0.01,
            $sformatf("offset %0.1f: up %0.2f dn %0.2f", offs_tab[i], w_up, w_dn));
      check(((w_up < w_dn) ? w_up : w_dn) > T_RST - 0.01 && ((w_up < w_dn) ? w_up : w_dn) < T_RST + 0.01,
            "shorter pulse is the reset delay");
    end
    // frequency detection: fref at 1.25x the rate of fdiv
    n_up = 0; n_dn = 0;
    fork
      repeat (40) begin fref = 1'b1; #(T / 2.5); fref = 1'b0; #(T / 2.5); end
      repeat (32) begin fdiv = 1'b1; #(T / 2.0); fdiv = 1'b0; #(T / 2.0); end
    join
    #(T);
    check(n_up > n_dn, $sformatf("faster reference gives more UP pulses (%0d vs %0d)", n_up, n_dn));
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
