// Self-checking test of one delay line (shift register + fine stages): a
// rising input edge must leave after (tap+1) Clock periods from the first
// Clock edge that sees it (rising final stage) or (tap+1/2) periods
// (falling final stage), plus 1 ns + 2 ns per inverter-chain tap + the
// rising-edge adjust; falling edges use the falling-edge adjust.
`timescale 1ns/1ps
module tb_delay_generator;
  import tr_pkg::*;
  localparam real T = 10.0;
  logic sr_clk = 0, din = 0, dout;
  dgen_cfg_t cfg;
  int checks = 0, failures = 0;
  always #(T/2) sr_clk = ~sr_clk;
  delay_generator dut (.sr_clk, .din, .cfg, .dout);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b);
    return (a - b < 0.002 && b - a < 0.002);
  endfunction
  initial begin
    realtime p0, tr, tf;
    cfg = '0;
    cfg.dsr = 16'h0801; cfg.ic = 24'h1;
    din = 1; #200 din = 0; #200;            // settle the line to 0
    for (int n = 0; n < 200; n++) begin
      automatic int k = $urandom_range(0, 9), fall = $urandom_range(0, 1);
      automatic int i = $urandom_range(0, 19), rc = $urandom_range(0, 3), fc = $urandom_range(0, 3);
      automatic real coarse = fall ? (k + 0.5) * T : (k + 1) * T;
      cfg.dsr = 16'(1 << k) | (fall ? 16'h0400 : 16'h0800);
      cfg.ic  = 24'(1 << i);
      cfg.ecr = {4'b0001, 4'(1 << rc)};
      cfg.ecf = {4'b0001, 4'(1 << fc)};
      repeat (15) @(posedge sr_clk);
      @(negedge sr_clk) #($urandom_range(0, 3)) din = 1;
      @(posedge sr_clk) p0 = $realtime;
      @(posedge dout) tr = $realtime - p0;
      repeat (15) @(posedge sr_clk);
      @(negedge sr_clk) #($urandom_range(0, 3)) din = 0;
      @(posedge sr_clk) p0 = $realtime;
      @(negedge dout) tf = $realtime - p0;
      chk(near(tr, coarse + 1.0 + 2.0 * i + 2.0 * rc), $sformatf("rising delay %0.2f", tr));
      chk(near(tf, coarse + 1.0 + 2.0 * i + 2.0 * fc), $sformatf("falling delay %0.2f", tf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
