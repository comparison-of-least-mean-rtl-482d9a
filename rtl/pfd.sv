// pfd -- sampled phase-frequency detector with per-comparison phase error.
//
// Everything runs on the sampling clock clk. Two flags play the part of the
// detector's two D flip-flops with D tied high: the UP flag is set by a rising
// edge of the inverted reference (the reference input passes through an
// inverter first, so the reference's falling edge is the one compared), the
// DN flag by a rising edge of the divided feedback. When both flags are high,
// their NAND goes low; that value passes through a one-sample memory and then
// clears both flags, so the overlap lasts exactly one sample. The per-sample
// output pd is UP - DN (-1, 0 or +1), which is the detector as the
// synthesizer defines it.
//
// Because the loop filter and the canceller work once per comparison, the
// detector also integrates pd over each comparison: when the clear fires,
// perr carries the sum of pd since the previous clear (positive when the
// reference leads, in sample ticks) and perr_valid pulses for one cycle. This
// integrate-and-dump stands in for the time-to-digital converter a digital
// synthesizer would have; its width PE_W is this design's choice.
//
// Interface: ref_i and fb_i are asynchronous squares and are passed through
// SYNC_STAGES flip-flops first. ref_edge_o pulses in the cycle the reference
// edge is taken, and is used to trigger the delta-sigma modulator.
// Latency: the synchronizer takes two to three cycles to show an edge;
// perr_valid comes two cycles after the later of the two edges is seen.
module pfd #(
  parameter int PE_W        = 12,
  parameter int SYNC_STAGES = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ref_i,
  input  logic                   fb_i,
  output logic                   up_o,
  output logic                   dn_o,
  output logic signed [1:0]      pd_o,
  output logic                   ref_edge_o,
  output logic signed [PE_W-1:0] perr_o,
  output logic                   perr_valid_o
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [SYNC_STAGES-1:0] ref_sync, fb_sync;
  logic ref_prev, fb_prev;
  logic ref_rise, fb_rise;
  logic clr;             // NAND of the flags, seen through the one-sample memory
  logic signed [PE_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_sync <= '0;
      fb_sync  <= '0;
      ref_prev <= 1'b0;
      fb_prev  <= 1'b0;
    end else begin
      // the reference is inverted on its way into the synchronizer
      ref_sync <= {ref_sync[SYNC_STAGES-2:0], ~ref_i};
      fb_sync  <= {fb_sync[SYNC_STAGES-2:0], fb_i};
      ref_prev <= ref_sync[SYNC_STAGES-1];
      fb_prev  <= fb_sync[SYNC_STAGES-1];
    end
  end

  assign ref_rise   = ref_sync[SYNC_STAGES-1] & ~ref_prev;
  assign fb_rise    = fb_sync[SYNC_STAGES-1] & ~fb_prev;
  assign ref_edge_o = ref_rise;
  // The flag registers already hold last sample's values, so the NAND of
  // their outputs, applied as a clear at this clock edge, is the NAND delayed
  // by one sample.
  assign clr        = up_o & dn_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_o <= 1'b0;
      dn_o <= 1'b0;
    end else begin
      // clear has priority over a new edge
      up_o <= clr ? 1'b0 : (up_o | ref_rise);
      dn_o <= clr ? 1'b0 : (dn_o | fb_rise);
    end
  end

  assign pd_o = {1'b0, up_o} - {1'b0, dn_o};

  // integrate-and-dump of pd over one comparison
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc          <= '0;
      perr_o       <= '0;
      perr_valid_o <= 1'b0;
    end else begin
      perr_valid_o <= 1'b0;
      if (clr) begin
        perr_o       <= acc + PE_W'(pd_o);
        perr_valid_o <= 1'b1;
        acc          <= '0;
      end else begin
        acc <= acc + PE_W'(pd_o);
      end
    end
  end

endmodule
