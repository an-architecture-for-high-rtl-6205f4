// Coarse stage of a delay line: a shift register clocked by Clock.
//
// The input (CycleClock/2 on the chip) runs through STAGES rising-edge flops.
// dsr[STAGES-1:0] picks, one-hot, the flop whose output is used: tap k delays
// by k+1 periods of Clock. The selected tap then passes either a falling-edge
// "master-only" stage (dsr[STAGES], half a period more) or a rising-edge flop
// (dsr[STAGES+1], a full period more), giving half-period resolution.
// With no tap or no final stage selected the output is held at 0. Bit 0 of
// the field is the shortest delay, as for every one-hot delay field.
// Because the input is a periodic square wave, a delay that overruns a
// tester cycle simply places the edge in the same position of a later cycle.
// Structure (10 stages, tap selection, rising flop or falling master-only
// stage) follows the architecture; the split of the 16-bit DSR field into a
// 10-bit tap part and a 2-bit final-stage part is this design's choice.
`timescale 1ns/1ps
module sr_delay #(
  parameter int STAGES = 10
) (
  input  logic              sr_clk,
  input  logic              din,
  input  logic [15:0]       dsr,
  output logic              dout
);
  logic [STAGES-1:0] chain;
  logic              tap, rise_q, fall_q;

  always_ff @(posedge sr_clk) chain <= {chain[STAGES-2:0], din};

  always_comb begin
    tap = 1'b0;
    for (int k = 0; k < STAGES; k++)
      if (dsr[k]) tap = chain[k];
  end

  always_ff @(negedge sr_clk) fall_q <= tap;
  always_ff @(posedge sr_clk) rise_q <= tap;

  assign dout = dsr[STAGES]   ? fall_q :
                dsr[STAGES+1] ? rise_q : 1'b0;
endmodule
