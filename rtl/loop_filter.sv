// loop_filter -- digital loop filter: zero-order hold, IIR low-pass, PI.
//
// The filter runs once per phase comparison (x_valid_i). The sample is held
// (zero-order hold) and passed through a first-order IIR low-pass,
//   lp(n) = lp(n-1) + (x(n) - lp(n-1)) * 2^-LPF_SHIFT,
// and then through the proportional-integral filter
//   H(z) = Kp + Ki * z^-1 / (1 - z^-1)
// with Kp = 0.21 and Ki = 0.04, the synthesizer's gains. With the loop gain
// normalised to one (below), the natural frequency is wn = Fref*sqrt(Ki)
// (10 Mrad/s, 1.6 MHz at a 50 MHz reference) and the damping is
// Kp / (2*sqrt(Ki)) = 0.525.
//
// The PI output, in sample ticks of phase error per comparison, is scaled by
// KDCO into the oscillator control word (volts, Q.TUNE_FRAC). KDCO = 0.05 V
// per tick makes one unit of filter output move the divided period by one
// sampling tick (5 GHz oscillator, 1 GHz/V, N+alpha = 100.3, 200 ps ticks),
// i.e. a loop gain of one; that normalisation is this design's choice. The
// low-pass order and its cutoff (LPF_SHIFT = 1, about 5.5 MHz at a 50 MHz
// update rate) are also this design's: the filter must pass 50-100 kHz, and a
// cutoff much below the 1.6 MHz loop bandwidth would make the loop unstable.
//
// Interface: x_i in fnsynth_pkg's sample format (Q12.12 ticks), tune_o a
// signed Q(TUNE_W-TUNE_FRAC).TUNE_FRAC voltage. Latency: tune_o and
// tune_valid_o follow x_valid_i by one clk cycle.
module loop_filter
  import fnsynth_pkg::*;
#(
  parameter int    LPF_SHIFT = 1,
  parameter gain_t KP        = gain_t'(860),   // 0.21 in Q4.12 (0.20996)
  parameter gain_t KI        = gain_t'(164),   // 0.04 in Q4.12 (0.04004)
  parameter gain_t KDCO      = gain_t'(205),   // 0.05 V/tick in Q4.12
  parameter int    TUNE_W    = 24,
  parameter int    TUNE_FRAC = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  sample_t                  x_i,
  input  logic                     x_valid_i,
  output logic signed [TUNE_W-1:0] tune_o,
  output logic                     tune_valid_o,
  output sample_t                  pi_o
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int PW = DATA_W + GAIN_W + 1;

  sample_t lp, lp_next, integ, pi_next;
  logic signed [PW-1:0] p_term, i_term;
  logic signed [PW-1:0] t_prod;

  assign lp_next = lp + ((x_i - lp) >>> LPF_SHIFT);
  assign p_term  = PW'(lp_next) * $signed({1'b0, KP});
  assign i_term  = PW'(lp_next) * $signed({1'b0, KI});
  // proportional path plus the integrator value before this update (z^-1)
  assign pi_next = sample_t'(p_term >>> GAIN_FRAC) + integ;
  assign t_prod  = PW'(pi_next) * $signed({1'b0, KDCO});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lp           <= '0;
      integ        <= '0;
      pi_o         <= '0;
      tune_o       <= '0;
      tune_valid_o <= 1'b0;
    end else begin
      tune_valid_o <= x_valid_i;
      if (x_valid_i) begin
        lp     <= lp_next;
        integ  <= integ + sample_t'(i_term >>> GAIN_FRAC);
        pi_o   <= pi_next;
        tune_o <= TUNE_W'(t_prod >>> (FRAC_W + GAIN_FRAC - TUNE_FRAC));
      end
    end
  end

endmodule
