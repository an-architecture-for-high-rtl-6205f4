// Force timing generator: the timing pulse of one channel.
//
// Two delay lines receive the same square wave at half the cycle rate. One is
// set to the wanted edge delay, the other to delay plus pulse width; the XOR
// of their outputs is high from "delay" to "delay + width" in every tester
// cycle. Both lines always carry a 50% duty-cycle wave, so narrow or wide
// pulses are not distorted, and since the wave is periodic an edge wanted
// close to the start of a cycle is obtained by delaying into the next cycle,
// leaving no dead band. The structure follows the architecture.
`timescale 1ns/1ps
module force_timing_gen
  import tr_pkg::*;
(
  input  logic      sr_clk,
  input  logic      cyc2_clk,
  input  dgen_cfg_t cfg_delay,
  input  dgen_cfg_t cfg_width,
  output logic      pulse
);
  logic d_out, w_out;

  delay_generator u_delay (.sr_clk, .din(cyc2_clk), .cfg(cfg_delay), .dout(d_out));
  delay_generator u_width (.sr_clk, .din(cyc2_clk), .cfg(cfg_width), .dout(w_out));

  assign pulse = d_out ^ w_out;
endmodule
