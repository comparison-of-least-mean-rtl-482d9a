// lms_canceller_tb -- self-checking testbench for the single-tap canceller.
//
// Part 1 drives random primary and reference samples under each of the five
// adaptation rules and random step sizes, and compares e, y and the new
// weight with a 64-bit integer model written from the update equations
// (LMS, NLMS with offset 0.25, sign-error, sign-data, sign-sign). For NLMS it
// waits for busy_o to fall and checks the divider's latency.
// Part 2 checks the cancelling itself: the primary input is 0.7 times the
// reference, and the weight must converge to 0.7 (LMS with mu = 0.5, and
// NLMS with mu = 1), leaving a residual error
// near zero.
module lms_canceller_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import fnsynth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout, busy;
  sample_t d = '0, u = '0, e, y, w;
  lms_algo_e algo = ALGO_LMS;
  gain_t mu = gain_t'(123);
  int checks = 0, failures = 0;
  longint m_w = 0;

  always #100 clk = ~clk;

  lms_canceller dut (.clk, .rst_n, .d_i(d), .u_i(u), .valid_i(vin),
                     .algo_i(algo), .mu_i(mu), .e_o(e), .y_o(y),
                     .valid_o(vout), .w_o(w), .busy_o(busy));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sgn(longint v);
    return (v > 0) ? 1 : ((v < 0) ? -1 : 0);
  endfunction

  function automatic longint sat(longint v);
    if (v > 64'sd8388607) return 64'sd8388607;
    if (v < -64'sd8388608) return -64'sd8388608;
    return v;
  endfunction

  longint m_y, m_e, dw, num, den;
  int lat;

  task automatic sample(longint dv, longint uv);
    @(negedge clk);
    d = sample_t'(dv);
    u = sample_t'(uv);
    vin = 1'b1;
    m_y = (m_w * uv) >>> 12;
    m_e = dv - m_y;
    unique case (algo)
      ALGO_LMS:        dw = (longint'(mu) * m_e * uv) >>> 24;
      ALGO_SIGN_ERROR: dw = (longint'(mu) * sgn(m_e) * uv) >>> 12;
      ALGO_SIGN_DATA:  dw = (longint'(mu) * m_e * sgn(uv)) >>> 12;
      ALGO_SIGN_SIGN:  dw = longint'(mu) * sgn(m_e) * sgn(uv);
      default: begin
        num = longint'(mu) * m_e * uv;
        den = uv * uv + (1 << 22);
        dw  = ((num < 0) ? -num : num) / den;
        if (num < 0) dw = -dw;
      end
    endcase
    m_w = sat(m_w + dw);
    @(negedge clk);
    vin = 1'b0;
    check(vout, "valid_o one cycle after valid_i");
    check(longint'(y) == m_y && longint'(e) == m_e,
          $sformatf("%s: y %0d e %0d, expected %0d %0d", algo.name(), y, e, m_y, m_e));
    if (algo == ALGO_NLMS) begin
      lat = 1;
      while (busy) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 66, $sformatf("NLMS update latency %0d cycles", lat));
    end
    check(longint'(w) == m_w, $sformatf("%s: w %0d, expected %0d", algo.name(), w, m_w));
  endtask

  task automatic restart();
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    m_w = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // part 1: random samples under every rule
    for (int a = 0; a < 5; a++) begin
      algo = lms_algo_e'(a);
      restart();
      for (int k = 0; k < 60; k++) begin
        longint uv;
        // |u| in [1/16, 2], |d| up to 4 ticks, mu up to 0.24: the weight
        // stays well inside its range
        uv = longint'($urandom_range(256, 1 << 13));
        if ($urandom_range(0, 1) == 1) uv = -uv;
        mu = gain_t'($urandom_range(0, 1000));
        sample(longint'($urandom_range(0, 1 << 15)) - (1 << 14), (k % 7 == 3) ? 0 : uv);
      end
    end
    // part 2: convergence to d = 0.7 u
    algo = ALGO_LMS;
    mu = gain_t'(2048);  // 0.5
    restart();
    for (int k = 0; k < 400; k++) begin
      longint uv;
      uv = longint'($urandom_range(0, 8192)) - 4096;    // +-1.0
      sample((uv * 2867) >>> 12, uv);
    end
    check(w > 2850 && w < 2885, $sformatf("LMS weight %0d converges to 0.7 (2867)", w));
    check(e > -20 && e < 20, $sformatf("LMS residual %0d near zero", e));
    algo = ALGO_NLMS;
    mu = gain_t'(4096);  // 1.0
    restart();
    for (int k = 0; k < 40; k++) begin
      longint uv;
      uv = longint'($urandom_range(0, 8192)) - 4096;
      sample((uv * 2867) >>> 12, uv);
    end
    check(w > 2855 && w < 2880, $sformatf("NLMS weight %0d converges to 0.7 (2867)", w));
    check(e > -12 && e < 12, $sformatf("NLMS residual %0d near zero", e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
