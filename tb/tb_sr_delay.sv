// Self-checking test of the shift-register coarse delay. For every tap and
// both final stages, a rising edge on the input (applied between Clock
// edges) must leave (tap+1) Clock periods after the first Clock rising edge
// that sees it when the final flop is chosen, and (tap+1/2) periods with the
// falling-edge final stage; a disabled output stays low.
`timescale 1ns/1ps
module tb_sr_delay;
  localparam real T = 10.0;
  logic sr_clk = 0, din = 0, dout;
  logic [15:0] dsr = 0;
  int checks = 0, failures = 0;
  always #(T/2) sr_clk = ~sr_clk;
  sr_delay dut (.sr_clk, .din, .dsr, .dout);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    realtime p0, te;
    for (int rep = 0; rep < 3; rep++)
    for (int k = 0; k < 10; k++)
      for (int mode = 0; mode < 3; mode++) begin
        dsr = 16'(1 << k);
        if (mode == 0) dsr[10] = 1;
        if (mode == 1) dsr[11] = 1;
        din = 0;
        repeat (14) @(posedge sr_clk);
        @(negedge sr_clk); #($urandom_range(0, 3));
        din = 1;
        @(posedge sr_clk); p0 = $realtime;
        fork
          begin @(posedge dout); te = $realtime; end
          begin #(15 * T); te = -1; end
        join_any
        disable fork;
        if (mode == 2) chk(te < 0 && dout == 0, "disabled output stays low");
        else begin
          automatic real want = (mode == 1) ? (k + 1) * T : (k + 0.5) * T;
          chk(te >= 0 && (te - p0) == want,
              $sformatf("tap %0d mode %0d: delay %0.2f want %0.2f", k, mode, te - p0, want));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
