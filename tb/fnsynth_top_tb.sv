// fnsynth_top_tb -- end-to-end testbench of the fractional-N synthesizer.
//
// Runs the closed loop at its default parameters: 5 GHz sampling clock,
// 50 MHz square reference (a sine of phase pi turned into a square: low for
// the first half period), N = 100 and fractional word 3 of 10, so the
// target is 100.3 * 50 MHz = 5.015 GHz. The oscillator starts at its
// quiescent 5.1 GHz and the loop has to pull it in.
//
// The run goes through a list of configurations, each for SETTLE reference
// periods and then MEASURE periods of measurement: the canceller switched
// out, plain LMS with mu = 0.03, NLMS with mu = 0.03, and every one of the
// five update rules at mu = 0.5, 1 and 1.2. For each it checks that the
// loop is locked (frequency estimate within 0.1 % of 5.015 GHz, phase error
// of every comparison within a few ticks) and prints the RMS of the phase
// error, the largest fractional spur of the oscillator's frequency (DFT of
// the control word at m/10 of the comparison rate, m = 1..5, the frequencies
// of the modulator's 10-step pattern, as peak deviation), the RMS of the
// loop-filter input, the weight, and the peak-to-peak period
// jitter of the oscillator measured with simulation time.
//
// It also counts the mechanisms of the design and fails if one never
// happened: N and N+1 periods (pulse swallows), UP and DN pulses, comparisons,
// weight updates, NLMS divisions, both positions of the canceller switch,
// every update rule, and frequency-estimate windows.
module fnsynth_top_tb;
  timeunit 1ps;
  timeprecision 1fs;
  import fnsynth_pkg::*;

  localparam int SETTLE  = 300;
  localparam int MEASURE = 200;

  logic clk = 1'b0, rst_n = 1'b0, ref_clk = 1'b0;
  logic [7:0] n = 8'd100;
  logic [3:0] frac = 4'd3;
  logic lms_en = 1'b0;
  logic [2:0] algo = 3'd0;
  gain_t mu = gain_t'(123);

  logic vco_clk, div, up, dn, perr_valid, carry, swallow, busy, tune_valid, fest_valid;
  logic signed [1:0]  pd;
  logic signed [11:0] perr;
  logic [3:0] state;
  sample_t lms_e, lms_w;
  logic signed [23:0] tune;
  logic [15:0] fest;

  int checks = 0, failures = 0;

  always #100 clk = ~clk;          // 5 GHz sampling clock
  initial begin
    #10000;                        // phase pi: low for the first half period
    forever begin
      ref_clk = 1'b1;
      #10000 ref_clk = 1'b0;
      #10000;
    end
  end

  fnsynth_top dut (
    .clk, .rst_n, .ref_i(ref_clk), .n_i(n), .frac_i(frac), .lms_en_i(lms_en),
    .algo_i(algo), .mu_i(mu),
    .vco_clk_o(vco_clk), .div_o(div), .up_o(up), .dn_o(dn), .pd_o(pd),
    .perr_o(perr), .perr_valid_o(perr_valid), .carry_o(carry),
    .dsm_state_o(state), .swallow_o(swallow), .lms_e_o(lms_e), .lms_w_o(lms_w),
    .lms_busy_o(busy), .tune_o(tune), .tune_valid_o(tune_valid),
    .fest_count_o(fest), .fest_valid_o(fest_valid)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---- mechanism counters ----
  int n_swallow = 0, n_up = 0, n_dn = 0, n_cmp = 0, n_wupd = 0, n_nlms = 0;
  int n_sw_on = 0, n_sw_off = 0, n_fest = 0, n_divp_n = 0, n_divp_n1 = 0;
  int n_algo[5] = '{default: 0};
  logic up_q = 1'b0, dn_q = 1'b0, busy_q = 1'b0;
  sample_t w_q = '0;
  always @(posedge clk) begin
    if (up && !up_q) n_up++;
    if (dn && !dn_q) n_dn++;
    if (busy && !busy_q) n_nlms++;
    if (lms_w != w_q) n_wupd++;
    up_q <= up; dn_q <= dn; busy_q <= busy; w_q <= lms_w;
    if (perr_valid) begin
      n_cmp++;
      if (lms_en) n_sw_on++; else n_sw_off++;
      if (lms_en) n_algo[algo]++;
    end
  end
  int vcnt = 0, sw_in_period = 0;
  logic div_q = 1'b0;
  always @(posedge vco_clk) begin
    vcnt++;
    if (swallow) n_swallow++;
    if (div && !div_q) begin
      if (vcnt == int'(n)) n_divp_n++;
      else if (vcnt == int'(n) + 1) n_divp_n1++;
      vcnt = 0;
    end
    div_q <= div;
  end
  always @(posedge vco_clk) if (fest_valid) n_fest++;

  // ---- measurements ----
  bit measuring = 0;
  real sum_pe2, sum_lf2, tmin, tmax;
  real spur;
  int  n_meas, max_abs_pe, fest_bad, fest_seen;
  realtime t_last = 0;
  // DFT of the oscillator control at the modulator's pattern frequencies
  // (m/10 of the comparison rate, m = 1..5), in Hz of frequency deviation:
  // the frequency modulation that makes the fractional spurs
  real sp_re[5], sp_im[5];
  int  n_tune;
  always @(posedge clk) if (measuring && tune_valid) begin
    for (int m = 1; m <= 5; m++) begin
      sp_re[m-1] += real'(tune) / 65536.0 * 1.0e9 * $cos(2.0 * 3.14159265358979 * m * n_tune / 10.0);
      sp_im[m-1] -= real'(tune) / 65536.0 * 1.0e9 * $sin(2.0 * 3.14159265358979 * m * n_tune / 10.0);
    end
    n_tune++;
  end
  always @(posedge clk) if (measuring && perr_valid) begin
    n_meas++;
    sum_pe2 += real'(perr) ** 2;
    if ((perr < 0 ? -int'(perr) : int'(perr)) > max_abs_pe)
      max_abs_pe = (perr < 0 ? -int'(perr) : int'(perr));
  end
  always @(posedge clk) if (measuring && dut.lf_valid)
    sum_lf2 += (real'(dut.lf_x) / 4096.0) ** 2;
  always @(posedge vco_clk) begin
    if (measuring && t_last > 0) begin
      if ($realtime - t_last < tmin) tmin = $realtime - t_last;
      if ($realtime - t_last > tmax) tmax = $realtime - t_last;
    end
    t_last = $realtime;
  end
  always @(posedge vco_clk) if (measuring && fest_valid) begin
    fest_seen++;
    // 0.1 % of 10030
    if (int'(fest) < 10020 || int'(fest) > 10040) fest_bad++;
  end

  task automatic run_config(string name, bit en, lms_algo_e a, real mu_r);
    // each configuration starts from reset, as a separate run
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    lms_en = en;
    algo = 3'(a);
    mu = gain_t'($rtoi(mu_r * 4096.0 + 0.5));
    repeat (SETTLE) @(posedge ref_clk);
    sum_pe2 = 0; sum_lf2 = 0; n_meas = 0; n_tune = 0; max_abs_pe = 0; fest_bad = 0; fest_seen = 0;
    tmin = 1.0e9; tmax = 0;
    foreach (sp_re[i]) begin
      sp_re[i] = 0;
      sp_im[i] = 0;
    end
    measuring = 1;
    repeat (MEASURE) @(posedge ref_clk);
    measuring = 0;
    spur = 0;
    foreach (sp_re[i])
      if (2.0 * $sqrt(sp_re[i] ** 2 + sp_im[i] ** 2) / n_tune > spur)
        spur = 2.0 * $sqrt(sp_re[i] ** 2 + sp_im[i] ** 2) / n_tune;
    $display("%-15s mu=%5.3f  rms perr %5.3f ticks  largest FM spur %7.1f kHz  rms loop in %5.3f  w %8.4f  max|perr| %0d  f_est %0d  p-p period jitter %0.2f ps",
             name, mu_r, $sqrt(sum_pe2 / n_meas), spur / 1.0e3, $sqrt(sum_lf2 / n_meas),
             real'(lms_w) / 4096.0, max_abs_pe, fest, tmax - tmin);
    check(n_meas >= MEASURE - 2 && n_meas <= MEASURE + 2,
          $sformatf("%s: %0d comparisons in %0d reference periods", name, n_meas, MEASURE));
    check(fest_seen >= 1 && fest_bad == 0,
          $sformatf("%s: frequency estimate %0d, expected 10030 +- 10", name, fest));
    check(max_abs_pe <= 6, $sformatf("%s: phase error up to %0d ticks", name, max_abs_pe));
  endtask

  initial begin
    #100us;
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_config("no canceller", 1'b0, ALGO_LMS, 0.03);
    run_config("LMS", 1'b1, ALGO_LMS, 0.03);
    run_config("NLMS", 1'b1, ALGO_NLMS, 0.03);
    foreach (mus[i]) begin
      run_config("LMS", 1'b1, ALGO_LMS, mus[i]);
      run_config("NLMS", 1'b1, ALGO_NLMS, mus[i]);
      run_config("sign-error LMS", 1'b1, ALGO_SIGN_ERROR, mus[i]);
      run_config("sign-data LMS", 1'b1, ALGO_SIGN_DATA, mus[i]);
      run_config("sign-sign LMS", 1'b1, ALGO_SIGN_SIGN, mus[i]);
    end
    $display("mechanisms: N periods %0d, N+1 periods %0d, swallows %0d, UP %0d, DN %0d, comparisons %0d, weight updates %0d, NLMS divisions %0d, switch off %0d on %0d, estimates %0d",
             n_divp_n, n_divp_n1, n_swallow, n_up, n_dn, n_cmp, n_wupd, n_nlms, n_sw_off, n_sw_on, n_fest);
    check(n_divp_n > 0,  "divide-by-N periods happened");
    check(n_divp_n1 > 0, "divide-by-N+1 periods happened");
    check(n_swallow > 0, "pulses were swallowed");
    check(n_up > 0 && n_dn > 0, "UP and DN pulses happened");
    check(n_wupd > 0,    "weight updates happened");
    check(n_nlms > 0,    "NLMS divisions happened");
    check(n_sw_on > 0 && n_sw_off > 0, "both switch positions used");
    check(n_fest > 0,    "frequency estimates happened");
    foreach (n_algo[i]) check(n_algo[i] > 0, $sformatf("update rule %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mus[3] = '{0.5, 1.0, 1.2};
endmodule
