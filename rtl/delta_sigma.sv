// delta_sigma -- first-order accumulator delta-sigma modulator.
//
// On each trigger (step_i high for one clk cycle) the fractional word frac_i
// is added to the accumulator. When the sum reaches MODULUS the carry output
// goes to 1 and the accumulator keeps only the remainder (sum - MODULUS);
// otherwise carry is 0 and the sum is kept. The fraction is frac_i/MODULUS,
// so the average carry rate equals that fraction. The defaults MODULUS = 10
// and a fractional word of 3 give the synthesizer's alpha = 0.3 exactly; the
// modulus-10 integer form is this design's choice (a binary accumulator is
// MODULUS = 2**ACC_W).
//
// Outputs hold between triggers. carry_o is the carry of the latest step.
// state_o is the accumulator value the latest step started from, i.e. the
// output of the unit delay in the loop: it is the modulator's accumulated
// quantization error, in units of 1/MODULUS, and it is what the spur
// canceller uses as its reference input.
//
// Timing: carry_o and state_o change one clk cycle after the step_i pulse.
// frac_i must be below MODULUS.
module delta_sigma #(
  parameter int MODULUS = 10,
  parameter int ACC_W   = $clog2(MODULUS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step_i,
  input  logic [ACC_W-1:0] frac_i,
  output logic             carry_o,
  output logic [ACC_W-1:0] state_o
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   sum;
  logic             wrap;

  assign sum  = {1'b0, acc} + {1'b0, frac_i};
  assign wrap = (sum >= (ACC_W+1)'(MODULUS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      carry_o <= 1'b0;
      state_o <= '0;
    end else if (step_i) begin
      state_o <= acc;
      carry_o <= wrap;
      acc     <= wrap ? ACC_W'(sum - (ACC_W+1)'(MODULUS)) : sum[ACC_W-1:0];
    end
  end

  initial assert (MODULUS >= 2 && MODULUS <= (1 << ACC_W))
    else $error("delta_sigma: MODULUS must fit in ACC_W bits");

endmodule
