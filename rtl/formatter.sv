// Formatter: turns the force data of a vector and the timing pulse into the
// drive signals of the pad.
//
// Formats (fmt):
//   NRZ  the pad takes the vector's level at the pulse's leading edge and
//        keeps it until the leading edge of a later cycle;
//   RZ   0, the data level while the pulse is high, then 0 again;
//   RO   1, the data level while the pulse is high, then 1 again;
//   RT   not driven, the data level while the pulse is high, then not driven;
//   RC   complement of the data, the data while the pulse is high, then the
//        complement again. The complement is taken from the vector directly
//        (its edge at the start of the cycle) or, with rc_mid, from a flop
//        clocked by the falling edge of CycleClock, which moves that
//        uncalibrated edge to mid-cycle.
// An inhibited channel (a DUT output) is never driven. Outputs follow the
// pad driver's convention: drive_hi = drive a 1, drive_lo_n = 0 to drive a 0.
// The five formats and the RC mid-cycle option follow the architecture; the
// gate-level form of the formatter is not given, so this is the simplest
// logic with the described behaviour.
`timescale 1ns/1ps
module formatter
  import tr_pkg::*;
(
  input  logic cycle_clk,
  input  logic pulse,
  input  logic force_d,
  input  logic inhibit,
  input  fmt_e fmt,
  input  logic rc_mid,
  output logic drive_hi,
  output logic drive_lo_n
);
  logic nrz_q, rc_q, rc_d, en, val;

  always_ff @(posedge pulse)      nrz_q <= force_d;
  always_ff @(negedge cycle_clk)  rc_q  <= force_d;

  assign rc_d = rc_mid ? rc_q : force_d;

  always_comb begin
    en  = !inhibit;
    val = force_d;
    unique case (fmt)
      FMT_NRZ: val = nrz_q;
      FMT_RZ:  val = pulse && force_d;
      FMT_RO:  val = !pulse || force_d;
      FMT_RT:  begin en = !inhibit && pulse; val = force_d; end
      FMT_RC:  val = pulse ? force_d : !rc_d;
      default: val = force_d;
    endcase
  end

  assign drive_hi   = en && val;
  assign drive_lo_n = !(en && !val);
endmodule
