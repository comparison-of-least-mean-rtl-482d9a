// freq_estimator -- measures the synthesized frequency against the reference.
//
// Counts oscillator cycles over WINDOW reference periods. The reference is
// brought into the oscillator domain with a two-flop synchronizer; each of
// its rising edges ends one reference period. When WINDOW periods have
// passed, count_o is loaded with the number of oscillator cycles in them and
// valid_o pulses for one oscillator cycle. The estimate is
//   f_out = count_o * F_ref / WINDOW,
// so with WINDOW = 100 and a 50 MHz reference one count is 0.5 MHz and a
// locked synthesizer (N + alpha = 100.3) reads 10030. The counting method
// and the window length are this design's choices; the synthesizer only
// specifies that the output frequency is estimated and displayed.
//
// Interface: vco_clk and rst_n (asynchronous), ref_i the square reference.
// The first window after reset starts at the first reference edge.
module freq_estimator #(
  parameter int WINDOW  = 100,
  parameter int COUNT_W = 16
) (
  input  logic               vco_clk,
  input  logic               rst_n,
  input  logic               ref_i,
  output logic [COUNT_W-1:0] count_o,
  output logic               valid_o
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int PW = $clog2(WINDOW + 1);

  logic [2:0]         ref_sync;   // two synchronizer flops and one for the edge
  logic               ref_rise;
  logic               started;
  logic [PW-1:0]      periods;
  logic [COUNT_W-1:0] cycles;

  assign ref_rise = ref_sync[1] & ~ref_sync[2];

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync <= '0;
      started  <= 1'b0;
      periods  <= '0;
      cycles   <= '0;
      count_o  <= '0;
      valid_o  <= 1'b0;
    end else begin
      ref_sync <= {ref_sync[1:0], ref_i};
      valid_o  <= 1'b0;
      if (ref_rise) begin
        started <= 1'b1;
        if (started && periods == PW'(WINDOW - 1)) begin
          // close the window; this cycle belongs to the next one
          count_o <= cycles + 1'b1;
          valid_o <= 1'b1;
          cycles  <= '0;
          periods <= '0;
        end else begin
          cycles  <= started ? cycles + 1'b1 : '0;
          periods <= started ? periods + 1'b1 : '0;
        end
      end else if (started) begin
        cycles <= cycles + 1'b1;
      end
    end
  end

endmodule
