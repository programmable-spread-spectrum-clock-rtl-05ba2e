// tb_phase_mux: self-checking test of the 8-to-1 phase multiplexer model.
//
// Generates eight ideal phases of an 800 ps clock and, on rising edges of the
// multiplexer output, requests steps of -2, -1, 0 and +1 phases as the MUX
// controller does. Checks that the output follows the selected phase once
// the select delay has passed, that every rising edge of the output lands
// exactly one period (+/- the requested number of 100 ps phase steps) after
// the previous one, i.e. that no switch glitches, and that all steps occurred.
module tb_phase_mux;

  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T = 800.0;

  logic [7:0] ph;
  logic [7:0] phase_sel = 8'b0000_0001;
  logic       clk_out;
  int checks = 0, failures = 0;

  phase_mux dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    ph = 8'b1111_0000;
    forever for (int j = 0; j < 8; j++) begin
      ph[j] = 1'b1;
      ph[(j + 4) % 8] = 1'b0;
      #(T / 8.0);
    end
  end

  int idx = 0, step = 0, n_step[4];
  realtime t_last = -1.0;
  int steps_tab[4] = '{-2, -1, 0, 1};

  always @(posedge clk_out) begin
    realtime dt;
    if (t_last >= 0.0) begin
      dt = $realtime - t_last;
      check(dt > T + step * T / 8.0 - 0.01 && dt < T + step * T / 8.0 + 0.01,
            $sformatf("edge spacing %0.2f ps after step %0d", dt, step));
    end
    t_last = $realtime;
    step = steps_tab[$urandom_range(0, 3)];
    n_step[step + 2]++;
    idx = (idx + step + 8) % 8;
    phase_sel <= 8'(1 << idx);
  end

  // the output equals the selected phase away from the switching instants
  always @(ph) begin
    #1;
    if (($realtime - t_last) > 200.0) check(clk_out == ph[idx], "output follows selected phase");
  end

  initial begin
    #(T * 2000);
    for (int k = 0; k < 4; k++) check(n_step[k] > 0, "every step size used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 5000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
