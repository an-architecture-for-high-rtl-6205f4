// Gate control of the dual-level pad driver.
//
// The pad has two tri-state drivers in parallel, one between the CMOS rails
// and one between the TTL-level rails; the output level is chosen by which
// of them is enabled. From DriveHi, nDriveLow (active low) and TTLMode this
// block produces the four "transistor on" signals. With both drive requests
// off the pad is high impedance. A request to drive high and low at once
// (which would short the rails) turns both sides off and is flagged by an
// assertion. The two-driver organisation follows the architecture; the
// break-before-make rule is this design's choice.
`timescale 1ns/1ps
module pin_driver_ctl (
  input  logic drive_hi,
  input  logic drive_lo_n,
  input  logic ttl_mode,
  output logic cmos_pu,
  output logic cmos_pd,
  output logic ttl_pu,
  output logic ttl_pd
);
  logic up, down;

  assign up   = drive_hi && drive_lo_n;
  assign down = !drive_lo_n && !drive_hi;

  assign cmos_pu = up   && !ttl_mode;
  assign cmos_pd = down && !ttl_mode;
  assign ttl_pu  = up   &&  ttl_mode;
  assign ttl_pd  = down &&  ttl_mode;

  always_comb begin
    a_no_overlap: assert (!(drive_hi && !drive_lo_n))
      else $error("pad driven high and low at once");
  end
endmodule
