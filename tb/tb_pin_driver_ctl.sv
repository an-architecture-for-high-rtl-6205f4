// Self-checking test of the pad driver selection: for every legal
// combination of DriveHi, nDriveLow and TTLMode exactly the pull-up or
// pull-down of the selected driver pair is on, or neither when the pad is
// not driven; the other pair stays off.
`timescale 1ns/1ps
module tb_pin_driver_ctl;
  logic drive_hi = 0, drive_lo_n = 1, ttl_mode = 0;
  logic cmos_pu, cmos_pd, ttl_pu, ttl_pd;
  int checks = 0, failures = 0;
  pin_driver_ctl dut (.drive_hi, .drive_lo_n, .ttl_mode, .cmos_pu, .cmos_pd, .ttl_pu, .ttl_pd);
  initial begin
    for (int n = 0; n < 200; n++) begin
      automatic int s = $urandom_range(0, 2);        // 0 off, 1 high, 2 low
      ttl_mode = 1'($urandom);
      drive_hi = (s == 1); drive_lo_n = (s != 2);
      #1;
      checks++;
      if ({cmos_pu, cmos_pd, ttl_pu, ttl_pd} !==
          {s == 1 && !ttl_mode, s == 2 && !ttl_mode, s == 1 && ttl_mode, s == 2 && ttl_mode}) begin
        failures++; $display("FAIL s=%0d ttl=%b", s, ttl_mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
