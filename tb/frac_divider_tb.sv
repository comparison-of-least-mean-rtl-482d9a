// frac_divider_tb -- self-checking testbench for the N / N+1 divider.
//
// Clocks the divider with a 5 GHz oscillator clock. After each rising edge
// of the divided output a new random carry is applied a few cycles later,
// as the modulator does; the testbench then counts oscillator cycles to the
// next rising edge and expects N + carry, and expects one swallow pulse per
// period with the carry set and none without. It runs with N = 100 (the
// synthesizer's value) and with random ratios, and checks that the divided
// output is high for the first N/2 cycles of each period.
module frac_divider_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] n = 8'd100;
  logic carry = 1'b0, div, swallow;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, nsw = 0, high_cnt = 0;
  int exp_period, exp_high;

  always #100 clk = ~clk;

  frac_divider dut (.vco_clk(clk), .rst_n, .n_i(n), .carry_i(carry),
                    .div_o(div), .swallow_o(swallow));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic div_q = 1'b0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      // wait for a rising edge of the divided clock
      do begin
        @(posedge clk);
        #1;
        cyc++;
        if (swallow) nsw++;
        if (div) high_cnt++;
        div_q = div;
      end while (!(div && high_cnt == 1));
      if (last_rise >= 0 && k >= 2) begin
        check(cyc - last_rise == exp_period,
              $sformatf("k %0d period %0d, expected %0d (n %0d)", k, cyc - last_rise, exp_period, n));
        check(nsw == exp_period - int'(n), $sformatf("%0d swallows", nsw));
        check(exp_high == int'(n) / 2, $sformatf("k %0d high time %0d of the divided clock", k, exp_high));
      end
      last_rise = cyc;
      nsw = 0;
      // new ratio and carry for this period, a few cycles after the edge
      if (k == 200) n = 8'($urandom_range(8, 200));
      if (k > 200 && (k % 20) == 0) n = 8'($urandom_range(8, 200));
      repeat (3) begin
        @(posedge clk);
        #1;
        cyc++;
        if (div) high_cnt++;
      end
      carry = 1'($urandom_range(0, 1));
      exp_period = int'(n) + int'(carry);
      // count the high time of this period
      while (div) begin
        @(posedge clk);
        #1;
        cyc++;
        if (swallow) nsw++;
        if (div) high_cnt++;
      end
      exp_high = high_cnt;
      high_cnt = 0;
      // a ratio change takes one period to settle: skip that check
      if (k == 200 || (k > 200 && (k % 20) == 0)) last_rise = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
