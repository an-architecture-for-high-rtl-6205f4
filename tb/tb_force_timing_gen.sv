// Self-checking test of the force timing generator. CycleClock/2 toggles at
// every cycle boundary and feeds the Delay and Width lines; their XOR must
// give exactly one pulse per cycle that starts at the Delay line's delay and
// ends at the Width line's delay after the cycle boundary, for random
// settings (Clock = 4 x CycleClock).
`timescale 1ns/1ps
module tb_force_timing_gen;
  import tr_pkg::*;
  localparam real TSR = 10.0, TCYC = 40.0;
  logic sr_clk = 0, cyc2_clk = 0, pulse;
  dgen_cfg_t cfg_delay, cfg_width;
  realtime t_cyc, t_rise, t_fall;
  int checks = 0, failures = 0, rises = 0, falls = 0;
  force_timing_gen dut (.sr_clk, .cyc2_clk, .cfg_delay, .cfg_width, .pulse);
  // Clock rising edges 5 ns after each cycle boundary
  always #(TSR/2) sr_clk = ~sr_clk;
  initial forever begin #(TCYC) cyc2_clk = ~cyc2_clk; end
  always @(cyc2_clk) t_cyc = $realtime;
  always @(posedge pulse) begin t_rise = $realtime; rises++; end
  always @(negedge pulse) begin t_fall = $realtime; falls++; end
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b);
    return (a - b < 0.002 && b - a < 0.002);
  endfunction
  function automatic dgen_cfg_t mk(input int k, input int i, input int e);
    dgen_cfg_t c = '0;
    c.dsr = 16'(1 << k) | 16'h0800;
    c.ic  = 24'(1 << i);
    c.ecr = {4'b0001, 4'(1 << e)};
    c.ecf = {4'b0001, 4'(1 << e)};
    return c;
  endfunction
  initial begin
    cfg_delay = mk(0, 0, 0); cfg_width = mk(0, 0, 0);
    for (int n = 0; n < 80; n++) begin
      automatic int kd = $urandom_range(0, 1), id = $urandom_range(0, 3), ed = $urandom_range(0, 1);
      automatic int kw = kd + $urandom_range(0, 1), iw = id + $urandom_range(1, 3), ew = $urandom_range(0, 1);
      automatic real dd = 5.0 + (kd + 1) * TSR + 1.0 + 2.0 * id + 2.0 * ed;
      automatic real dw = 5.0 + (kw + 1) * TSR + 1.0 + 2.0 * iw + 2.0 * ew;
      int r0, f0;
      if (dw <= dd || dw >= TCYC - 1.0) continue;
      cfg_delay = mk(kd, id, ed); cfg_width = mk(kw, iw, ew);
      repeat (8) @(cyc2_clk);             // let the lines fill
      r0 = rises; f0 = falls;
      repeat (6) begin
        realtime tc;
        @(cyc2_clk); tc = $realtime;
        #(TCYC - 0.1);
        chk(near(t_rise - tc, dd), $sformatf("pulse start %0.2f want %0.2f", t_rise - tc, dd));
        chk(near(t_fall - tc, dw), $sformatf("pulse end %0.2f want %0.2f", t_fall - tc, dw));
      end
      chk(rises - r0 == 7 && falls - f0 == 7, "one pulse per cycle");  // 6 checked + the cycle under way
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
