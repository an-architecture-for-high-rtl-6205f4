// One pin-electronics channel: everything between the vector data path and
// one DUT pad.
//
// Force side: the Delay and Width lines form the timing pulse, the formatter
// applies the vector's force bit in the channel's format, and the driver
// control picks the CMOS or TTL-level driver. Acquire side: the Sample line
// clocks the two edge samplers and the result is retimed to CycleClock.
// Calibration side: the phase detector compares the pad with RefClock; its
// result is readable in the IOCtl register. All settings live in the
// channel's registers (pe_regs), written over the host bus.
//
// Timing: force_d/inhibit are taken at the start of a cycle and drive the pad
// during it. acq carries the sample of cycle n during cycle n+2, with or
// without the mid-cycle stage (without it an extra flop adds the cycle, so
// the data path sees one fixed latency). The mid-cycle stage is meant for
// sample times in the second half of the cycle.
// Channel organisation follows the architecture (one register set per
// channel); the fixed acquire latency is this design's choice. The IOCtl
// bit that selects the variable input threshold has no logical effect here.
`timescale 1ns/1ps
module pe_channel
  import tr_pkg::*;
(
  input  logic       clk,         // CycleClock
  input  logic       rst,
  input  logic       sr_clk,      // Clock
  input  logic       cyc2_clk,    // CycleClock/2
  input  logic       ref_clk,     // RefClock
  // host registers
  input  logic       sel,
  input  logic [4:0] offset,
  input  logic       wr_en,
  input  logic [7:0] wdata,
  output logic [9:0] rdata,
  // vector
  input  logic       force_d,
  input  logic       inhibit,
  output logic       acq,
  // pad
  input  logic       dut_in,
  output logic       cmos_pu,
  output logic       cmos_pd,
  output logic       ttl_pu,
  output logic       ttl_pd,
  output logic       pulse        // force timing pulse, for observation
);
  dgen_cfg_t  cfg_sample, cfg_width, cfg_delay;
  logic [7:0] ioctl;
  fmt_e       fmt;
  logic [1:0] pd_result;
  logic       drive_hi, drive_lo_n, sample_clk, acq_raw, acq_d;

  pe_regs u_regs (
    .clk, .rst, .sel, .offset, .wr_en, .wdata, .rdata, .pd_result,
    .cfg_sample, .cfg_width, .cfg_delay, .ioctl, .fmt
  );

  force_timing_gen u_ftg (.sr_clk, .cyc2_clk, .cfg_delay, .cfg_width, .pulse);

  formatter u_fmt (
    .cycle_clk(clk), .pulse, .force_d, .inhibit, .fmt,
    .rc_mid(ioctl[IO_RC_MID]), .drive_hi, .drive_lo_n
  );

  pin_driver_ctl u_drv (
    .drive_hi, .drive_lo_n, .ttl_mode(ioctl[IO_TTL_OUT]),
    .cmos_pu, .cmos_pd, .ttl_pu, .ttl_pd
  );

  delay_generator u_sample (.sr_clk, .din(cyc2_clk), .cfg(cfg_sample), .dout(sample_clk));

  acquire u_acq (
    .cycle_clk(clk), .sample_clk, .dut_in, .midpipe(ioctl[IO_MIDPIPE]), .acq(acq_raw)
  );

  always_ff @(posedge clk) acq_d <= acq_raw;
  assign acq = ioctl[IO_MIDPIPE] ? acq_raw : acq_d;

  phase_detector u_pd (.ref_clk, .pad(dut_in), .result(pd_result));
endmodule
