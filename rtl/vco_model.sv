// vco_model -- behavioural model of the synthesizer's oscillator.
//
// Behavioural model, not synthesizable: the oscillator is an analog part. It
// produces a square clock whose frequency is
//   f = F0_HZ + KV_HZ_PER_V * v,   v = tune_i / 2^TUNE_FRAC volts,
// clamped to [FMIN_HZ, FMAX_HZ]. The quiescent frequency of 5.1 GHz and the
// sensitivity of 1 GHz per volt are the synthesizer's settings; the clamp
// limits are its reported output range, 4.797 to 5.163 GHz. The control
// word is the digital loop filter's output, so in a digital synthesizer
// this is the digitally controlled oscillator. The half period is worked out
// afresh at every edge from the current control word, so a change of
// tune_i takes effect at the next edge. While en_i is low the output stays
// low; the oscillator starts with a rising edge half a period after en_i
// rises.
module vco_model #(
  parameter real F0_HZ       = 5.1e9,
  parameter real KV_HZ_PER_V = 1.0e9,
  parameter real FMIN_HZ     = 4.797e9,
  parameter real FMAX_HZ     = 5.163e9,
  parameter int  TUNE_W      = 24,
  parameter int  TUNE_FRAC   = 16
) (
  input  logic                     en_i,
  input  logic signed [TUNE_W-1:0] tune_i,
  output logic                     clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  function automatic real freq_of(logic signed [TUNE_W-1:0] t);
    real f;
    f = F0_HZ + KV_HZ_PER_V * (real'(t) / real'(64'(1) << TUNE_FRAC));
    if (f < FMIN_HZ) f = FMIN_HZ;
    if (f > FMAX_HZ) f = FMAX_HZ;
    return f;
  endfunction

  initial clk_o = 1'b0;

  always begin
    if (!en_i) begin
      clk_o = 1'b0;
      @(posedge en_i);
    end
    // half period in ps
    #(0.5e12 / freq_of(tune_i)) clk_o = ~clk_o;
  end

endmodule
