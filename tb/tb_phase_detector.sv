// Self-checking test of the phase detector: a DUT pad toggling at half the
// RefClock rate with a random phase is sampled on both RefClock edges. The
// held result bit 0 must equal the pad level at the latest rising RefClock
// edge before the latest falling edge, and bit 1 the level at the latest
// falling edge before the latest rising edge; both early (1) and late (0)
// readings must occur.
`timescale 1ns/1ps
module tb_phase_detector;
  localparam int TR = 20;
  logic ref_clk = 0, pad = 0;
  logic [1:0] result;
  int checks = 0, failures = 0, early = 0, late = 0;
  bit at_rise = 0, at_fall = 0;
  phase_detector dut (.ref_clk, .pad, .result);
  always #(TR/2) ref_clk = ~ref_clk;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin                              // pad: period 2*TR, random phase
    forever begin
      automatic int ph = $urandom_range(0, 2 * TR - 2) | 1;   // odd: never on a RefClock edge
      #(ph);
      repeat (10) begin pad = 1; #(TR); pad = 0; #(TR); end
      #(2 * TR - ph);
    end
  end
  initial begin
    repeat (3) @(posedge ref_clk);
    for (int n = 0; n < 1000; n++) begin
      @(posedge ref_clk) at_rise = pad;
      #1 if (n > 0) chk(result[1] === at_fall, "falling-edge sample held");
      @(negedge ref_clk) at_fall = pad;
      #1 chk(result[0] === at_rise, "rising-edge sample held");
      if (at_rise) early++; else late++;
    end
    chk(early > 0 && late > 0, "early and late both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
