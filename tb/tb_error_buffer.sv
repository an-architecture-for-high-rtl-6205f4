// Self-checking test of the error buffer: the compare flags a cycle when an
// unmasked acquired bit differs from the expect bit; the first 16 failing
// cycles are stored as {cycle, acquired data} in order; later errors are
// ignored once full; clear empties it.
`timescale 1ns/1ps
module tb_error_buffer;
  logic clk = 0, rst = 1, clear = 0, valid = 0, error, full;
  logic [15:0] acq = 0, expect_d = 0, mask = 0;
  logic [23:0] cycle = 0;
  logic [4:0]  count;
  logic [3:0]  host_addr = 0;
  logic [39:0] host_rdata;
  logic [39:0] model [$];
  int checks = 0, failures = 0, ignored = 0;
  always #5 clk = ~clk;
  error_buffer dut (.clk, .rst, .clear, .valid, .acq, .expect_d, .mask, .cycle, .error, .count, .full, .host_addr, .host_rdata);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 3; run++) begin
      model.delete();
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      chk(count == 0 && !full, "cleared");
      for (int n = 0; n < 200; n++) begin
        bit e;
        valid = $urandom_range(0, 4) != 0;
        expect_d = 16'($urandom); mask = 16'($urandom) & 16'($urandom);
        acq = expect_d;
        if ($urandom_range(0, 2) == 0) acq ^= 16'(1 << $urandom_range(0, 15));
        cycle = 24'(n + run * 1000);
        #1;
        e = valid && (((acq ^ expect_d) & ~mask) != 0);
        chk(error === e, "compare");
        if (e && model.size() < 16) model.push_back({cycle, acq});
        else if (e) ignored++;
        @(negedge clk);
      end
      valid = 0;
      chk(int'(count) == model.size(), "count");
      chk(full == (model.size() == 16), "full flag");
      foreach (model[i]) begin
        host_addr = 4'(i); #1;
        chk(host_rdata === model[i], $sformatf("entry %0d", i));
      end
    end
    chk(ignored > 0, "errors after full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
