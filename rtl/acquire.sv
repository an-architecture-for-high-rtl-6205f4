// Acquire path of a channel: sampling the DUT pin and bringing the sample
// into the CycleClock domain.
//
// The sample delay line delivers the half-rate square wave delayed to the
// sample time, so it has one edge per tester cycle, alternately rising and
// falling. Two samplers are used, one on each edge; a multiplexer steered by
// the sample clock's level passes whichever sampled last, so each sample is
// presented for a whole cycle. An optional stage clocked at mid-cycle
// (falling CycleClock), chosen by midpipe, gives late samples a stable point
// to be taken from; the final flop retimes to rising CycleClock.
//
// Timing: a sample taken in cycle n appears on acq after the rising CycleClock
// edge that ends cycle n, or, with midpipe and a sample time in the second
// half of the cycle, one cycle later. The DUT pin is a logic level here; the
// analog threshold comparison of the real sampler is not modelled.
// Two edge samplers, the mid-cycle stage and the retiming flop follow the
// architecture; steering the multiplexer by the sample clock level is this
// design's reading of the figure.
`timescale 1ns/1ps
module acquire (
  input  logic cycle_clk,
  input  logic sample_clk,
  input  logic dut_in,
  input  logic midpipe,
  output logic acq
);
  logic pos_q, neg_q, m1, mid_q, m2;

  always_ff @(posedge sample_clk) pos_q <= dut_in;
  always_ff @(negedge sample_clk) neg_q <= dut_in;

  assign m1 = sample_clk ? pos_q : neg_q;

  always_ff @(negedge cycle_clk) mid_q <= m1;
  assign m2 = midpipe ? mid_q : m1;

  always_ff @(posedge cycle_clk) acq <= m2;
endmodule
