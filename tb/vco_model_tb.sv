// vco_model_tb -- self-checking testbench for the oscillator model.
//
// Checks that the output stays low while disabled, then sets a series of
// control words and measures the period of the output between rising edges
// with simulation time: the frequency must be 5.1 GHz + 1 GHz/V times the
// control voltage (0.1 % tolerance for the femtosecond time step), and be
// held at 4.797 GHz and 5.163 GHz beyond the ends of the range.
module vco_model_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic en = 1'b0, vclk;
  logic signed [23:0] tune = '0;
  int checks = 0, failures = 0, nedge = 0;
  realtime t0, t1;
  real f, fexp, v;

  vco_model dut (.en_i(en), .tune_i(tune), .clk_o(vclk));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge vclk) nedge++;

  real volts[8] = '{0.0, -0.085, 0.05, -0.2, 0.06, -0.4, 0.5, -0.303};
  initial begin
    #5000;
    check(nedge == 0 && vclk == 1'b0, "no clock while disabled");
    en = 1'b1;
    foreach (volts[i]) begin
      v = volts[i];
      tune = 24'($rtoi(v * 65536.0));
      fexp = 5.1e9 + 1.0e9 * (real'(tune) / 65536.0);
      if (fexp < 4.797e9) fexp = 4.797e9;
      if (fexp > 5.163e9) fexp = 5.163e9;
      repeat (3) @(posedge vclk);
      t0 = $realtime;
      repeat (10) @(posedge vclk);
      t1 = $realtime;
      f = 10.0 / ((t1 - t0) * 1.0e-12);
      check(f > fexp * 0.999 && f < fexp * 1.001,
            $sformatf("v %f: f %e, expected %e", v, f, fexp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
