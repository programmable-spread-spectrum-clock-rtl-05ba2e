// tb_triangle_gen: self-checking test of the programmable triangle generator.
//
// Drives randomly gated CLK_tri enables and checks, after every enable, the
// staircase value and the Sel direction against the closed form: after k
// enables the value is k * sr while k mod (2 * STEPS) < STEPS (rising) and
// (2 * STEPS - k mod 2 * STEPS) * sr otherwise, and Sel is high on the falling
// half. Covers two spread words, holding without enable, and the clear in
// non-SSC mode. The generator runs at its default STEPS = 168.
module tb_triangle_gen;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int STEPS = 168;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        en = 1'b0;
  logic        ssc_en = 1'b0;
  logic [4:0]  pro_sr = 5'd0;
  logic [11:0] tri_val;
  logic        sel;
  int checks = 0, failures = 0;
  int peak_seen = 0;

  triangle_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int sr, int n_en);
    int k, ph, exp_v, exp_s;
    pro_sr = 5'(sr);
    ssc_en = 1'b1;
    k = 0;
    while (k < n_en) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) k++;
      ph    = k % (2 * STEPS);
      exp_v = (ph <= STEPS) ? ph * sr : (2 * STEPS - ph) * sr;
      exp_s = ((k / STEPS) % 2);
      check(int'(tri_val) == exp_v && int'(sel) == exp_s,
            $sformatf("sr=%0d k=%0d value %0d (exp %0d) sel %0d (exp %0d)", sr, k, tri_val, exp_v, sel, exp_s));
      if (int'(tri_val) == STEPS * sr) peak_seen++;
    end
    en = 1'b0;
    // non-SSC clears the generator
    ssc_en = 1'b0;
    @(posedge clk); #1;
    check(tri_val == '0 && sel == 1'b0, "cleared in non-SSC mode");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    run(20, 2 * 2 * STEPS + 37);
    run(1, 2 * STEPS + 5);
    run(13, 3 * STEPS);
    check(peak_seen >= 4, "peaks reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
