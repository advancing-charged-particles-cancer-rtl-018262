// tdl_sampler: second sampling stage of a tapped delay line and hit detector.
//
// The first sampling stage sits in the delay line itself (the flip-flops next
// to the carry cells). Its word can go metastable, so this block registers it
// once more (the "2nd sampling" stage of the layout) before using it. A hit is
// recognised when the leading taps of the line change from all zeros to any
// one between two consecutive samples: the OR over the first LEAD_TAPS taps is
// used rather than tap 0 alone, so a bubble or a metastable value on a single
// early tap neither hides nor doubles a hit. A hit must stay high until the
// next clock edge has sampled it, and must go low again before the next hit.
//
// Interface and timing: taps_i is the first-stage word, sampled on each clock
// edge. hit_o pulses for one cycle two clock edges after the edge that first
// saw the hit, and therm_o then holds that same edge's word. bubble_o flags
// that this word was not a clean thermometer code (a 1 above a 0). Two-stage
// sampling follows the published layout; the detection rule, LEAD_TAPS and
// the active-low synchronous reset are this design's choice.
module tdl_sampler #(
  parameter int unsigned TAPS      = tdc_pkg::TAPS,
  parameter int unsigned LEAD_TAPS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] taps_i,
  output logic            hit_o,
  output logic [TAPS-1:0] therm_o,
  output logic            bubble_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [TAPS-1:0] stage2;
  logic            lead, lead_prev;

  assign lead = |stage2[LEAD_TAPS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage2    <= '0;
      lead_prev <= 1'b0;
      hit_o     <= 1'b0;
      therm_o   <= '0;
      bubble_o  <= 1'b0;
    end else begin
      stage2    <= taps_i;
      lead_prev <= lead;
      hit_o     <= lead && !lead_prev;
      therm_o   <= stage2;
      bubble_o  <= |(stage2[TAPS-1:1] & ~stage2[TAPS-2:0]);
    end
  end

  initial begin
    if (LEAD_TAPS < 1 || LEAD_TAPS > TAPS) $error("LEAD_TAPS out of range");
  end
endmodule
