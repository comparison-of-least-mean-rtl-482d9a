// fnsynth_top -- digital fractional-N frequency synthesizer with an LMS
// spur canceller.
//
// The loop: the phase-frequency detector (pfd) compares the reference with
// the divided oscillator output and reports, once per comparison, the phase
// error in sampling-clock ticks. The adaptive canceller (lms_canceller)
// subtracts from that error the part correlated with the delta-sigma
// modulator's quantization error; a switch (lms_en_i) feeds either the
// cleaned or the raw error to the loop filter (zero-order hold, IIR
// low-pass, PI). The filter output tunes the oscillator (vco_model, a
// behavioural model), whose output is divided by N or N+1 (frac_divider)
// as the modulator's carry (delta_sigma) says, so the average ratio is
// N + frac/MODULUS. With the reference at 50 MHz, N = 100 and alpha = 0.3
// the output is 5.015 GHz. A frequency estimator counts oscillator cycles
// per 100 reference periods.
//
// Clocks: clk is the sampling clock (5 GHz, 200 ps, in the synthesizer) on
// which the detector, canceller, modulator and filter run; the divider and
// the estimator run on the oscillator clock. The carry and the reference
// cross into the oscillator domain, the divided clock into the sampling
// domain, each through two flip-flops. KDCO, the loop filter's scale from
// ticks to volts, must follow the sampling period (0.05 V per 200 ps tick)
// to keep the loop gain at one. rst_n resets both domains; the
// oscillator is held stopped while rst_n is low, so the oscillator-domain
// flops leave reset before their clock starts.
//
// The modulator is stepped on the reference edge taken by the detector. Its
// state output (the accumulator before the latest step) is converted to a
// fraction with its mean removed, u = (state - (MODULUS-1)/2) / MODULUS in
// Q12.12, as the canceller's reference input; at that moment it matches the
// carries that set the comparison just made. Removing the mean is this
// design's choice: with a reference that has a constant part, the single
// weight can cancel the constant part of the phase error too, i.e. work
// against the loop's integrator, and the loop can be pulled out of lock.
module fnsynth_top
  import fnsynth_pkg::*;
#(
  parameter int MODULUS = 10,
  parameter int ACC_W   = $clog2(MODULUS),
  parameter int N_W     = 8,
  parameter int PE_W    = 12,
  parameter int WINDOW  = 100,
  parameter int TUNE_W  = 24,
  // loop-gain scale, V per tick in Q4.12; proportional to the sampling
  // period (205 = 0.05 V for 200 ps ticks)
  parameter gain_t KDCO = gain_t'(205)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ref_i,         // square reference
  input  logic [N_W-1:0]           n_i,           // integer ratio N
  input  logic [ACC_W-1:0]         frac_i,        // fractional word
  input  logic                     lms_en_i,      // 1: canceller output to loop filter
  input  logic [2:0]               algo_i,        // lms_algo_e encoding
  input  logic [GAIN_W-1:0]        mu_i,          // step size, Q4.12
  output logic                     vco_clk_o,
  output logic                     div_o,
  output logic                     up_o,
  output logic                     dn_o,
  output logic signed [1:0]        pd_o,          // UP - DN per sample
  output logic signed [PE_W-1:0]   perr_o,
  output logic                     perr_valid_o,
  output logic                     carry_o,
  output logic [ACC_W-1:0]         dsm_state_o,
  output logic                     swallow_o,
  output sample_t                  lms_e_o,
  output sample_t                  lms_w_o,
  output logic                     lms_busy_o,    // NLMS divider running
  output logic signed [TUNE_W-1:0] tune_o,
  output logic                     tune_valid_o,
  output logic [15:0]              fest_count_o,
  output logic                     fest_valid_o
);

  timeunit 1ps;
  timeprecision 1fs;

  // u = (state - (MODULUS-1)/2) / MODULUS in Q12.12: the modulator state
  // as a fraction, with its mean removed
  localparam int QSCALE = ((1 << FRAC_W) + MODULUS / 2) / MODULUS;
  localparam int QMEAN  = ((MODULUS - 1) * QSCALE) / 2;

  logic              vco_clk;
  logic              ref_edge;
  sample_t           d_s, u_s, d_q, lf_x, y_unused;
  logic              lms_valid, lf_valid;
  sample_t           pi_unused;

  pfd #(.PE_W(PE_W)) u_pfd (
    .clk, .rst_n,
    .ref_i, .fb_i(div_o),
    .up_o, .dn_o, .pd_o,
    .ref_edge_o(ref_edge),
    .perr_o, .perr_valid_o
  );

  delta_sigma #(.MODULUS(MODULUS), .ACC_W(ACC_W)) u_dsm (
    .clk, .rst_n,
    .step_i(ref_edge), .frac_i,
    .carry_o, .state_o(dsm_state_o)
  );

  assign d_s = sample_t'(perr_o) <<< FRAC_W;
  assign u_s = sample_t'(dsm_state_o) * sample_t'(QSCALE) - sample_t'(QMEAN);

  lms_canceller u_lms (
    .clk, .rst_n,
    .d_i(d_s), .u_i(u_s), .valid_i(perr_valid_o),
    .algo_i(lms_algo_e'(algo_i)), .mu_i,
    .e_o(lms_e_o), .y_o(y_unused), .valid_o(lms_valid),
    .w_o(lms_w_o), .busy_o(lms_busy_o)
  );

  // raw error, delayed to line up with the canceller output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            d_q <= '0;
    else if (perr_valid_o) d_q <= d_s;
  end

  // the manual switch in front of the loop filter
  assign lf_x     = lms_en_i ? lms_e_o : d_q;
  assign lf_valid = lms_valid;

  loop_filter #(.TUNE_W(TUNE_W), .KDCO(KDCO)) u_lf (
    .clk, .rst_n,
    .x_i(lf_x), .x_valid_i(lf_valid),
    .tune_o, .tune_valid_o, .pi_o(pi_unused)
  );

  vco_model #(.TUNE_W(TUNE_W)) u_vco (
    .en_i(rst_n), .tune_i(tune_o),
    .clk_o(vco_clk)
  );

  assign vco_clk_o = vco_clk;

  frac_divider #(.N_W(N_W)) u_div (
    .vco_clk, .rst_n,
    .n_i, .carry_i(carry_o),
    .div_o, .swallow_o
  );

  freq_estimator #(.WINDOW(WINDOW), .COUNT_W(16)) u_fest (
    .vco_clk, .rst_n, .ref_i,
    .count_o(fest_count_o), .valid_o(fest_valid_o)
  );

endmodule
