// delta_sigma_tb -- self-checking testbench for the accumulator modulator.
//
// Steps the modulator with the synthesizer's fraction (3/10) and then with
// random fractional words, at irregular intervals, and compares carry and
// state after every step with an integer model of the accumulator. It also
// checks that ten steps with a word of 3 give exactly three carries (the
// average ratio N + 0.3) and that outputs hold between steps.
module delta_sigma_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int MOD = 10;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [3:0] frac = 4'd3, state;
  logic carry;
  int checks = 0, failures = 0;
  int model_acc = 0, exp_state, exp_carry, ncarry;

  always #100 clk = ~clk;

  delta_sigma dut (.clk, .rst_n, .step_i(step), .frac_i(frac),
                                    .carry_o(carry), .state_o(state));

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

  task automatic do_step();
    @(negedge clk) step = 1'b1;
    @(negedge clk) step = 1'b0;
    exp_state = model_acc;
    exp_carry = (model_acc + int'(frac) >= MOD);
    model_acc = (model_acc + int'(frac)) % MOD;
    check(state == 4'(exp_state) && carry == 1'(exp_carry),
          $sformatf("frac %0d: state %0d carry %0d, expected %0d %0d",
                    frac, state, carry, exp_state, exp_carry));
    repeat ($urandom_range(0, 4)) @(negedge clk);
    check(state == 4'(exp_state) && carry == 1'(exp_carry), "outputs hold between steps");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 5; r++) begin
      ncarry = 0;
      for (int k = 0; k < 10; k++) begin
        do_step();
        ncarry += exp_carry;
      end
      check(ncarry == 3, $sformatf("%0d carries in 10 steps with alpha 0.3", ncarry));
    end
    for (int k = 0; k < 300; k++) begin
      frac = 4'($urandom_range(0, MOD - 1));
      do_step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
