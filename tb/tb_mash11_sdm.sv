// tb_mash11_sdm: self-checking test of the MASH 1-1 sigma-delta modulator.
//
// A reference model, written from the difference equations of two cascaded
// first-order modulators (integer division and remainder instead of carry
// bits), predicts every output; the modulator output must equal it two
// clocks after the input (Y = f z^-2 + (1 - z^-1)^2 E2). Independently of the
// model, the running sum of y must follow the running sum of f / 4096 within
// 2 (the shaped error is bounded), a zero input must give only "hold", and
// the output must stay within -1..2. Inputs: constants, a slow staircase
// triangle like the one of the triangle generator, and random words.
module tb_mash11_sdm;

  timeunit 1ps;
  timeprecision 1fs;

  import sscg_pkg::*;

  localparam int M = 4096;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic [11:0] f = '0;
  sdm_code_e   y;
  int checks = 0, failures = 0;

  mash11_sdm dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference state
  int r1, r2, q1_prev, q2_prev;
  int yref[$];
  longint sum_y, sum_f;
  int n_nonzero;

  function automatic int code_val(sdm_code_e c);
    return (c == SDM_RIGHT1) ? -1 : int'(c);
  endfunction

  task automatic step(int fin);
    int q1, q2, in2, yv;
    // stage 1 works on f, stage 2 on stage 1's previous residue
    in2 = r1;
    q1  = (r1 + fin) / M;  r1 = (r1 + fin) % M;
    q2  = (r2 + in2) / M;  r2 = (r2 + in2) % M;
    yv  = q1_prev + q2 - q2_prev;
    q1_prev = q1; q2_prev = q2;
    yref.push_back(yv);
    f = 12'(fin);
    @(posedge clk); #1;
    // the register holds the value computed from the previous input
    if (yref.size() > 1) begin
      void'(yref.pop_front());
      check(code_val(y) == yref[0], $sformatf("y=%0d expected %0d", code_val(y), yref[0]));
    end
    sum_y += code_val(y);
    if (code_val(y) != 0) n_nonzero++;
  endtask

  task automatic restart();
    rst_n = 1'b0; #2; rst_n = 1'b1;
    r1 = 0; r2 = 0; q1_prev = 0; q2_prev = 0;
    yref.delete(); yref.push_back(0);
    sum_y = 0; sum_f = 0; n_nonzero = 0;
  endtask

  int hist[int];
  longint fsum_delayed[$];

  task automatic run_seq(string name, int n, int mode);
    int v;
    longint err, fs2;
    restart();
    fsum_delayed.delete();
    fs2 = 0;
    for (int i = 0; i < n; i++) begin
      case (mode)
        0: v = 0;
        1: v = 1024;
        2: v = 4095;
        3: v = ((i / 8) % 336 < 168) ? ((i / 8) % 336) * 20 : (336 - (i / 8) % 336) * 20;
        default: v = $urandom_range(0, 4095);
      endcase
      fsum_delayed.push_back(v);
      step(v);
      hist[code_val(y)]++;
      // y at this point reflects inputs up to two clocks back
      if (fsum_delayed.size() > 2) fs2 += fsum_delayed.pop_front();
      err = sum_y * M - fs2;
      if (i % 64 == 63)
        check(err < 2 * M && err > -2 * M, $sformatf("%s: running-sum error %0d/4096 at %0d", name, err, i));
    end
    if (mode == 0) check(n_nonzero == 0, "zero input holds");
  endtask

  initial begin
    run_seq("zero", 500, 0);
    run_seq("quarter", 2000, 1);
    run_seq("max", 2000, 2);
    run_seq("triangle", 8 * 336, 3);
    run_seq("random", 3000, 4);
    check(hist.exists(-1) && hist.exists(0) && hist.exists(1) && hist.exists(2), "all four codes produced");
    foreach (hist[k]) check(k >= -1 && k <= 2, $sformatf("output %0d in range", k));
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
