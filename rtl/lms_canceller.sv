// lms_canceller -- single-tap adaptive noise canceller (LMS family).
//
// The canceller removes from the primary input d (the phase error) the part
// that is correlated with the reference input u (the delta-sigma modulator's
// accumulated quantization error). With one weight w (filter length one),
//   y(n) = w(n) * u(n)             filter output
//   e(n) = d(n) - y(n)             canceller output, also the adaptation error
// and the weight is adapted by the rule chosen on algo_i:
//   LMS         w += mu * e * u
//   NLMS        w += mu * e * u / (u*u + EPS)
//   sign-error  w += mu * sign(e) * u
//   sign-data   w += mu * e * sign(u)
//   sign-sign   w += mu * sign(e) * sign(u)
// with sign(0) = 0 and no leakage (leakage factor one). mu_i is the step
// size; the synthesizer uses mu = 0.03, and 0.5, 1 and 1.2 when the rules
// are compared. The update equations, the filter length of one, the set of
// rules and the adaptation on the canceller's own output e follow the
// synthesizer's description; the fixed-point formats, the divider and EPS
// are this design's.
// EPS, the NLMS offset, keeps the denominator away from zero; its default of
// 0.25 is this design's choice. With a single tap the NLMS step is
// mu*e*u/(u*u+EPS), which without an offset would be mu*e/u and grow without
// bound for small u; with EPS = 0.25 the gain u/(u*u+EPS) is at most 1.
//
// Numbers: d, u, e, y and w are fnsynth_pkg samples (signed Q12.12); mu is an
// unsigned Q4.12 gain. Products are formed at full width and rounded toward
// minus infinity back to Q12.12; the weight saturates at the sample range.
//
// Timing: e_o and y_o are registered and valid one cycle after valid_i. For
// the four multiplier-only rules the weight is updated in that same cycle.
// NLMS divides with a restoring divider, one quotient bit per cycle, so the
// weight is updated NUM_W+1 cycles after the sample and busy_o is high
// meanwhile; a new NLMS sample must not arrive while busy_o is high (the
// synthesizer gives about 100 cycles per comparison).
module lms_canceller
  import fnsynth_pkg::*;
#(
  parameter int EPS = 1 << 22   // NLMS offset 0.25, in Q.24 units of u*u
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sample_t   d_i,
  input  sample_t   u_i,
  input  logic      valid_i,
  input  lms_algo_e algo_i,
  input  gain_t     mu_i,
  output sample_t   e_o,
  output sample_t   y_o,
  output logic      valid_o,
  output sample_t   w_o,
  output logic      busy_o
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int PW    = 2 * DATA_W;                 // w*u, u*u
  localparam int NUM_W = GAIN_W + 2 * DATA_W;        // |mu*e*u|
  localparam int DEN_W = PW;
  localparam int SUMW  = NUM_W + 2;
  localparam int IDX_W = $clog2(NUM_W);
  localparam sample_t SMAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam sample_t SMIN = {1'b1, {(DATA_W-1){1'b0}}};

  sample_t w;
  logic signed [PW-1:0] wu;
  sample_t y, e;
  logic signed [1:0] sgn_e, sgn_u;
  logic signed [SUMW-1:0] mu_e_u, mu_u, mu_e, mu_s, dw_wide;
  logic signed [PW-1:0] uu;

  assign wu = PW'(w) * PW'(u_i);
  assign y  = sample_t'(wu >>> FRAC_W);
  assign e  = d_i - y;

  assign sgn_e = (e == 0)   ? 2'sd0 : (e[DATA_W-1]   ? -2'sd1 : 2'sd1);
  assign sgn_u = (u_i == 0) ? 2'sd0 : (u_i[DATA_W-1] ? -2'sd1 : 2'sd1);

  // mu as a signed operand
  logic signed [GAIN_W:0] mu_s1;
  assign mu_s1  = $signed({1'b0, mu_i});

  assign mu_e_u = SUMW'(mu_s1) * SUMW'(e) * SUMW'(u_i);         // Q.36
  assign mu_u   = SUMW'(mu_s1) * SUMW'(u_i) * SUMW'(sgn_e);     // Q.24
  assign mu_e   = SUMW'(mu_s1) * SUMW'(e) * SUMW'(sgn_u);       // Q.24
  assign mu_s   = SUMW'(mu_s1) * SUMW'(sgn_e) * SUMW'(sgn_u);   // Q.12
  assign uu     = PW'(u_i) * PW'(u_i);                          // Q.24

  always_comb begin
    unique case (algo_i)
      ALGO_SIGN_ERROR: dw_wide = mu_u >>> GAIN_FRAC;
      ALGO_SIGN_DATA:  dw_wide = mu_e >>> GAIN_FRAC;
      ALGO_SIGN_SIGN:  dw_wide = mu_s;
      default:         dw_wide = mu_e_u >>> (GAIN_FRAC + FRAC_W);   // LMS
    endcase
  end

  // saturating weight update
  function automatic sample_t sat_add(sample_t a, logic signed [SUMW-1:0] b);
    logic signed [SUMW:0] s;
    s = (SUMW+1)'(a) + (SUMW+1)'(b);
    if (s > (SUMW+1)'(SMAX))      return SMAX;
    else if (s < (SUMW+1)'(SMIN)) return SMIN;
    else                          return sample_t'(s);
  endfunction

  // ---- NLMS restoring divider: |mu*e*u| / (u*u + EPS) ----
  logic [NUM_W-1:0] num, quo;
  logic [DEN_W-1:0] den;
  logic [DEN_W-1:0] rem;
  logic [DEN_W:0]   rem_sh;
  logic             neg;
  logic [$clog2(NUM_W+1)-1:0] bitn;
  logic             div_busy;
  logic signed [SUMW-1:0] quo_s;

  assign rem_sh = {rem, num[IDX_W'(bitn - 1'b1)]};
  assign quo_s  = neg ? -$signed({2'b00, quo}) : $signed({2'b00, quo});
  assign busy_o = div_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w        <= '0;
      e_o      <= '0;
      y_o      <= '0;
      valid_o  <= 1'b0;
      div_busy <= 1'b0;
      num      <= '0;
      den      <= '0;
      rem      <= '0;
      quo      <= '0;
      neg      <= 1'b0;
      bitn     <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        e_o <= e;
        y_o <= y;
        if (algo_i == ALGO_NLMS) begin
          if (!div_busy) begin
            num      <= NUM_W'(mu_e_u < 0 ? -mu_e_u : mu_e_u);
            neg      <= (mu_e_u < 0);
            den      <= DEN_W'(uu) + DEN_W'(EPS);
            rem      <= '0;
            quo      <= '0;
            bitn     <= ($clog2(NUM_W+1))'(NUM_W);
            div_busy <= 1'b1;
          end
        end else begin
          w <= sat_add(w, dw_wide);
        end
      end
      if (div_busy) begin
        if (bitn != 0) begin
          // one restoring step per cycle, most significant bit first
          if (rem_sh >= {1'b0, den}) begin
            rem <= DEN_W'(rem_sh - {1'b0, den});
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= DEN_W'(rem_sh);
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
          bitn <= bitn - 1'b1;
        end else begin
          // quotient of Q.36 by Q.24 is the Q.12 weight step
          w        <= sat_add(w, quo_s);
          div_busy <= 1'b0;
        end
      end
    end
  end

  assign w_o = w;

  // An NLMS sample may only arrive when the divider is idle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(valid_i && algo_i == ALGO_NLMS && div_busy))
    else $error("lms_canceller: NLMS sample while the divider is busy");

endmodule
