// freq_estimator_tb -- self-checking testbench for the frequency estimator.
//
// Runs the estimator with a 50 MHz reference and an oscillator clock at
// 100.3 times the reference (5.015 GHz, the synthesizer's target), then at
// 5.1 GHz and at 4.8 GHz. Each finished window must read the number of
// oscillator cycles in 100 reference periods (10030, 10200, 9600), to
// within one count for the phase of the two clocks.
module freq_estimator_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic vclk = 1'b0, rclk = 1'b0, rst_n = 1'b0, valid;
  logic [15:0] count;
  realtime vhalf = 20000.0 / 100.3 / 2.0;
  int checks = 0, failures = 0, expect_cnt = 10030, nwin = 0;

  always #(vhalf) vclk = ~vclk;
  always #10000 rclk = ~rclk;

  freq_estimator dut (.vco_clk(vclk), .rst_n, .ref_i(rclk), .count_o(count),
                      .valid_o(valid));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge vclk) begin
    if (valid) begin
      nwin++;
      // the window after a frequency change is mixed: skip it
      if (nwin != 5 && nwin != 9)
        check(int'(count) >= expect_cnt - 1 && int'(count) <= expect_cnt + 1,
              $sformatf("window %0d count %0d, expected %0d", nwin, count, expect_cnt));
    end
  end

  initial begin
    #1000 rst_n = 1'b1;
    wait (nwin == 4);
    vhalf = 1.0e12 / 5.1e9 / 2.0;
    expect_cnt = 10200;
    wait (nwin == 8);
    vhalf = 1.0e12 / 4.8e9 / 2.0;
    expect_cnt = 9600;
    wait (nwin == 12);
    check(nwin == 12, "twelve windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
