// frac_divider -- pulse-swallow N / N+1 divider of the oscillator clock.
//
// A counter on the oscillator clock counts 0 .. n_i-1 and the output is high
// during the first half of that count, so each output period is n_i
// oscillator cycles with its rising edge when the counter wraps. When the
// delta-sigma carry is set, one oscillator pulse is swallowed: the counter
// holds for one cycle, and that output period lasts n_i+1 cycles. Averaged
// over the modulator's sequence the division ratio is N + alpha.
//
// The carry comes from the sampling-clock domain. It is passed through a
// two-flop synchronizer and is looked at once per output period, at the
// middle of the count, where the modulator (stepped on the reference edge,
// near the output edge) is not changing it. That sampling point is this
// design's choice; the swallow itself is the divider's defined behaviour.
//
// Interface: vco_clk is the oscillator output, rst_n an asynchronous reset,
// n_i the integer ratio N (100 in the synthesizer), carry_i the modulator
// carry. div_o is the divided clock, swallow_o pulses for the oscillator
// cycle that is swallowed. n_i must be at least 4.
module frac_divider #(
  parameter int N_W = 8
) (
  input  logic           vco_clk,
  input  logic           rst_n,
  input  logic [N_W-1:0] n_i,
  input  logic           carry_i,
  output logic           div_o,
  output logic           swallow_o
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [N_W-1:0] cnt;
  logic [1:0]     carry_sync;
  logic           armed;      // carry seen at mid-count: swallow the next pulse
  logic [N_W-1:0] half;

  assign half = n_i >> 1;

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_sync <= '0;
      cnt        <= '0;
      armed      <= 1'b0;
      swallow_o  <= 1'b0;
      div_o      <= 1'b0;
    end else begin
      carry_sync <= {carry_sync[0], carry_i};
      swallow_o  <= 1'b0;
      if (armed) begin
        // swallowed pulse: the count does not advance
        armed     <= 1'b0;
        swallow_o <= 1'b1;
      end else begin
        cnt <= (cnt >= n_i - 1'b1) ? '0 : cnt + 1'b1;
        if (cnt == half) armed <= carry_sync[1];
      end
      div_o <= (cnt < half);
    end
  end

endmodule
