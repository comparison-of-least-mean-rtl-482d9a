// loop_filter_tb -- self-checking testbench for the digital loop filter.
//
// Feeds the filter random phase-error samples (Q12.12) at irregular
// intervals and compares the PI output and the oscillator tuning word after
// each sample with a 64-bit integer model of the same difference equations:
// first-order low-pass with coefficient 1/2, then Kp = 0.21 and Ki = 0.04
// (rounded to 860/4096 and 164/4096) with the integrator delayed by one
// sample, then 0.05 V per tick. It checks the one-cycle latency, and that a
// constant input makes the integral path ramp (the PI output grows each
// sample by Ki times the input once the low-pass has settled).
module loop_filter_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import fnsynth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, xv = 1'b0, tv;
  sample_t x = '0, pi;
  logic signed [23:0] tune;
  int checks = 0, failures = 0;
  longint m_lp = 0, m_int = 0, m_pi = 0, m_tune = 0, lpn, prev_pi;

  always #100 clk = ~clk;

  loop_filter dut (.clk, .rst_n, .x_i(x), .x_valid_i(xv), .tune_o(tune),
                   .tune_valid_o(tv), .pi_o(pi));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(longint v);
    @(negedge clk);
    x  = sample_t'(v);
    xv = 1'b1;
    // model
    lpn    = m_lp + ((v - m_lp) >>> 1);
    m_pi   = ((lpn * 860) >>> 12) + m_int;
    m_int  = m_int + ((lpn * 164) >>> 12);
    m_lp   = lpn;
    m_tune = (m_pi * 205) >>> 8;
    @(negedge clk);
    xv = 1'b0;
    check(tv, "tune_valid one cycle after the sample");
    check(longint'(pi) == m_pi, $sformatf("pi %0d, expected %0d", pi, m_pi));
    check(longint'(tune) == m_tune, $sformatf("tune %0d, expected %0d", tune, m_tune));
    repeat ($urandom_range(1, 5)) @(negedge clk);
    check(!tv && longint'(tune) == m_tune, "tune holds between samples");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // random samples of up to +-40 ticks
    for (int k = 0; k < 300; k++)
      feed(longint'($urandom_range(0, 80 * 4096)) - 40 * 4096);
    // constant error: integral path ramps by Ki * x per sample
    for (int k = 0; k < 40; k++) feed(10 * 4096);
    prev_pi = longint'(pi);
    feed(10 * 4096);
    // 0.04 * 10 ticks = 0.4 tick = 1640 LSB per sample (low-pass within 1 LSB)
    check(longint'(pi) - prev_pi >= 1639 && longint'(pi) - prev_pi <= 1640,
          $sformatf("integral ramp %0d per sample", longint'(pi) - prev_pi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
