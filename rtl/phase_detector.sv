// Calibration phase detector of a channel.
//
// The level of the DUT pad is sampled by D flip-flops clocked by the
// reference clock: rise_q on the rising and fall_q on the falling edge of
// RefClock. For an edge being calibrated, the sample tells whether the pad
// had already switched when the reference edge arrived (early) or not
// (late). Each result is copied into a holding flop on the opposite edge of
// RefClock (the rising-edge result when RefClock falls), where the host
// reads it. Sweeping the channel's delay settings until the result flips
// finds the reference edge to within one delay step.
// The flip-flop detector and the hold-on-falling-edge behaviour follow the
// architecture; the falling-edge twin in this form is this design's choice.
`timescale 1ns/1ps
module phase_detector (
  input  logic       ref_clk,
  input  logic       pad,
  output logic [1:0] result      // {falling-edge sample, rising-edge sample}
);
  logic rise_q, fall_q, rise_h, fall_h;

  always_ff @(posedge ref_clk) rise_q <= pad;
  always_ff @(negedge ref_clk) fall_q <= pad;
  always_ff @(negedge ref_clk) rise_h <= rise_q;
  always_ff @(posedge ref_clk) fall_h <= fall_q;

  assign result = {fall_h, rise_h};
endmodule
