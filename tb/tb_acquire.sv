// Self-checking test of the acquire path. The sample clock toggles once per
// cycle at a programmable offset s from the cycle boundary, so each cycle
// has one sampling edge, alternately rising and falling; the DUT pin holds a
// new random level around each sampling edge. Without the mid-cycle stage
// (s within the cycle) the sample taken in cycle n is on acq during cycle
// n+1; with it (s between mid-cycle and mid-cycle of the next cycle) during
// cycle n+2.
`timescale 1ns/1ps
module tb_acquire;
  localparam int TC = 40;
  logic cycle_clk = 0, sample_clk = 0, dut_in = 0, midpipe = 0, acq;
  int checks = 0, failures = 0;
  int s;
  bit smp [$];                              // level at each sampling edge, by cycle
  acquire dut (.cycle_clk, .sample_clk, .dut_in, .midpipe, .acq);
  task automatic chk(input bit ok, input string str);
    checks++; if (!ok) begin failures++; $display("FAIL %s", str); end
  endtask
  // cycle boundary at k*TC: cycle_clk rises; falls at mid-cycle
  initial forever begin cycle_clk = 1; #(TC/2); cycle_clk = 0; #(TC/2); end
  task automatic run(input bit mp, input int off, input int ncyc);
    int lat = mp ? 2 : 1;
    @(posedge cycle_clk);
    midpipe = mp; s = off;
    smp.delete();
    fork
      begin                                 // sample clock and pin stimulus
        #(off);
        for (int n = 0; n < ncyc; n++) begin
          bit v = 1'($urandom);
          dut_in = v;
          #2 sample_clk = ~sample_clk; smp.push_back(v);
          #(TC - 2);
        end
      end
      begin                                 // checker, in the middle of each cycle
        #(TC / 4);
        for (int n = 0; n < ncyc + lat; n++) begin
          if (n >= lat + 2 && n - lat < smp.size())
            chk(acq === smp[n - lat], $sformatf("mid=%0b s=%0d cycle %0d", mp, off, n));
          #(TC);
        end
      end
    join
  endtask
  initial begin
    #(TC * 4);
    for (int r = 0; r < 20; r++) begin
      run(0, $urandom_range(1, TC - 6), 50);       // sample edge inside the cycle
      run(1, $urandom_range(TC / 2 + 2, TC + TC / 2 - 6), 50);  // after mid-cycle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
