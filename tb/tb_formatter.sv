// Self-checking test of the formatter. Each cycle the force bit changes at
// the cycle boundary and a timing pulse of random position and width occurs;
// the drive outputs are compared at many points of the cycle with the
// definition of each format: NRZ holds the bit from the pulse's leading edge,
// RZ drives the bit during the pulse and 0 elsewhere, RO the bit during the
// pulse and 1 elsewhere, RT drives the bit only during the pulse, RC drives
// the bit during the pulse and its complement elsewhere (with the mid-cycle
// option, the complement of the bit present at mid-cycle). Inhibit turns
// both drivers off. Every format and inhibit must be exercised.
`timescale 1ns/1ps
module tb_formatter;
  import tr_pkg::*;
  localparam int TC = 40;
  logic cycle_clk = 0, pulse = 0, force_d = 0, inhibit = 0, rc_mid = 0;
  logic drive_hi, drive_lo_n;
  fmt_e fmt = FMT_NRZ;
  int checks = 0, failures = 0;
  int seen [6];
  bit nrz_m = 0, mid_m = 0;
  formatter dut (.cycle_clk, .pulse, .force_d, .inhibit, .fmt, .rc_mid, .drive_hi, .drive_lo_n);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  // expected {en, val}
  function automatic logic [1:0] model(input fmt_e f, input bit p, input bit d, input bit inh,
                                       input bit nrz, input bit mid, input bit rcm);
    bit en = !inh, v = d;
    case (f)
      FMT_NRZ: v = nrz;
      FMT_RZ:  v = p && d;
      FMT_RO:  v = !p || d;
      FMT_RT:  begin en = !inh && p; v = d; end
      FMT_RC:  v = p ? d : !(rcm ? mid : d);
      default: ;
    endcase
    return {en, v};
  endfunction
  always @(posedge pulse) nrz_m = force_d;
  always @(negedge cycle_clk) mid_m = force_d;
  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int ps = $urandom_range(2, 25), pw = $urandom_range(3, 12);
      if (n % 50 == 0) begin
        fmt = fmt_e'($urandom_range(0, 4)); rc_mid = 1'($urandom);
      end
      cycle_clk = 1; force_d = 1'($urandom); inhibit = $urandom_range(0, 7) == 0;
      for (int t = 0; t < TC; t++) begin
        logic [1:0] m;
        if (t == ps) pulse = 1;
        if (t == ps + pw) pulse = 0;
        if (t == TC / 2) cycle_clk = 0;
        #0.5;
        m = model(fmt, pulse, force_d, inhibit, nrz_m, mid_m, rc_mid);
        chk(drive_hi === (m[1] && m[0]) && drive_lo_n === !(m[1] && !m[0]),
            $sformatf("fmt %s t=%0d pulse=%b d=%b inh=%b", fmt.name(), t, pulse, force_d, inhibit));
        if (!inhibit) seen[int'(fmt)]++; else seen[5]++;
        #0.5;
      end
    end
    for (int f = 0; f < 6; f++) chk(seen[f] > 0, $sformatf("case %0d never exercised", f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
