// tb_charge_pump: self-checking test of the programmable charge-pump model.
//
// For every current word and every UP/DN combination checks the output
// current: +I for UP alone, -I for DN alone, 0 for both or neither, with
// I = (code + 1) * 25 uA.
module tb_charge_pump;

  timeunit 1ps;
  timeprecision 1fs;

  logic       up = 1'b0, dn = 1'b0;
  logic [1:0] cp_code = 2'd0;
  real        icp;
  int checks = 0, failures = 0;

  charge_pump dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real i_exp, i_set;
    for (int c = 0; c < 4; c++) begin
      for (int u = 0; u < 2; u++) for (int d = 0; d < 2; d++) begin
        cp_code = 2'(c); up = 1'(u); dn = 1'(d);
        #10;
        i_set = 25.0e-6 * (c + 1);
        i_exp = (u == d) ? 0.0 : (u == 1 ? i_set : -i_set);
        check(icp > i_exp - 1.0e-9 && icp < i_exp + 1.0e-9,
              $sformatf("code %0d up %0d dn %0d: %g A (exp %g)", c, u, d, icp, i_exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
