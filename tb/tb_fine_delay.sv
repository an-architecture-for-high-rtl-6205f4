// Self-checking test of the analog fine-delay model: an input edge leaves
// after 1 ns + 2 ns per inverter-chain tap + the edge-adjust delay of its
// direction (coarse 2 ns, fine 0.6 ns steps); rising and falling edges are
// adjusted independently; the constant taps give 0 and 1.
`timescale 1ns/1ps
module tb_fine_delay;
  logic din = 0, dout;
  logic [23:0] ic = 0;
  logic [7:0] ecr = 0, ecf = 0;
  int checks = 0, failures = 0;
  fine_delay dut (.din, .ic, .ecr, .ecf, .dout);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b);
    return (a - b < 0.002 && b - a < 0.002);
  endfunction
  initial begin
    realtime t0, tr, tf;
    ic = 1; din = 1; #60 din = 0; #60;       // settle the model's output to 0
    for (int n = 0; n < 300; n++) begin
      automatic int i = $urandom_range(0, 19), rc = $urandom_range(0, 3), rf = $urandom_range(0, 3);
      automatic int fc = $urandom_range(0, 3), ff = $urandom_range(0, 3);
      real wr, wf;
      ic = 24'(1 << i);
      ecr = {4'(1 << rf), 4'(1 << rc)};
      ecf = {4'(1 << ff), 4'(1 << fc)};
      wr = 1.0 + 2.0 * i + 2.0 * rc + 0.6 * rf;
      wf = 1.0 + 2.0 * i + 2.0 * fc + 0.6 * ff;
      #100;
      t0 = $realtime; din = 1;
      @(posedge dout); tr = $realtime - t0;
      #80;
      t0 = $realtime; din = 0;
      @(negedge dout); tf = $realtime - t0;
      chk(near(tr, wr), $sformatf("rising delay %0.3f want %0.3f", tr, wr));
      chk(near(tf, wf), $sformatf("falling delay %0.3f want %0.3f", tf, wf));
    end
    ic = 24'(1 << 21); #1 chk(dout === 1, "constant 1 tap");
    ic = 24'(1 << 20); #1 chk(dout === 0, "constant 0 tap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
