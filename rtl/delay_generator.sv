// One programmable delay line of a pin-electronics channel.
//
// The square wave at half the tester cycle rate enters the coarse shift
// register (sr_delay, resolution half a period of Clock) and then the fine
// analog stages (fine_delay: 2 ns inverter chain, then separate rising and
// falling edge adjust with sub-nanosecond steps). The settings come from one
// generator's registers (DSR, IC, ECR, ECF). The output is the input square
// wave, delayed; a channel uses three of these (Delay, Width, Sample).
// The three-stage chain follows the architecture.
`timescale 1ns/1ps
module delay_generator
  import tr_pkg::*;
(
  input  logic      sr_clk,
  input  logic      din,
  input  dgen_cfg_t cfg,
  output logic      dout
);
  logic coarse;

  sr_delay   u_sr   (.sr_clk, .din, .dsr(cfg.dsr), .dout(coarse));
  fine_delay u_fine (.din(coarse), .ic(cfg.ic), .ecr(cfg.ecr), .ecf(cfg.ecf), .dout);
endmodule
