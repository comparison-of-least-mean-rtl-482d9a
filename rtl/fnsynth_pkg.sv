// fnsynth_pkg -- types and fixed-point formats shared by the fractional-N
// synthesizer blocks.
//
// All loop signals between the phase detector and the oscillator use one
// signed fixed-point format, Q(DATA_W-FRAC_W).FRAC_W, with the unit "one
// sample tick of phase error" (one period of the sampling clock). The LMS
// step size and the loop-filter gains are unsigned Q.GAIN_FRAC numbers.
// The five adaptation rules of the canceller are selected by lms_algo_e; the
// set of rules is the one the synthesizer is compared with, the encoding is
// this design's choice.
package fnsynth_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  localparam int DATA_W    = 24;  // width of loop samples
  localparam int FRAC_W    = 12;  // fraction bits of loop samples
  localparam int GAIN_W    = 16;  // width of gains and step size
  localparam int GAIN_FRAC = 12;  // fraction bits of gains and step size

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [GAIN_W-1:0] gain_t;

  typedef enum logic [2:0] {
    ALGO_LMS        = 3'd0,  // w += mu * e * u
    ALGO_NLMS       = 3'd1,  // w += mu * e * u / (u*u + eps)
    ALGO_SIGN_ERROR = 3'd2,  // w += mu * sign(e) * u
    ALGO_SIGN_DATA  = 3'd3,  // w += mu * e * sign(u)
    ALGO_SIGN_SIGN  = 3'd4   // w += mu * sign(e) * sign(u)
  } lms_algo_e;

endpackage
