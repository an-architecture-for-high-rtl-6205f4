// Self-checking test of the 64 x 20 history buffer: writes go to the write
// pointer, which advances and wraps at 64; ptr_clr puts the write at entry 0;
// both read ports are asynchronous and see the buffer contents.
`timescale 1ns/1ps
module tb_history_buffer;
  logic clk = 0, rst = 1, ptr_clr = 0, we = 0;
  logic [19:0] wdata = 0, rdata, host_rdata;
  logic [5:0] raddr = 0, host_raddr = 0, wptr;
  logic [19:0] model [64];
  int mptr = 0, checks = 0, failures = 0, wraps = 0, clrs = 0;
  always #5 clk = ~clk;
  history_buffer dut (.clk, .rst, .ptr_clr, .we, .wdata, .raddr, .rdata, .host_raddr, .host_rdata, .wptr);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 64; i++) begin           // fill
      we = 1; wdata = 20'($urandom); model[mptr] = wdata; mptr = (mptr + 1) % 64;
      @(negedge clk);
    end
    for (int n = 0; n < 4000; n++) begin
      we = $urandom_range(0, 3) != 0;
      ptr_clr = $urandom_range(0, 40) == 0;
      wdata = 20'($urandom);
      raddr = 6'($urandom); host_raddr = 6'($urandom);
      #1;
      chk(rdata === model[raddr], "copy read port");
      chk(host_rdata === model[host_raddr], "host read port");
      chk(int'(wptr) == mptr, "write pointer");
      if (ptr_clr) begin mptr = 0; clrs++; end
      if (we) begin
        model[mptr] = wdata;
        if (mptr == 63) wraps++;
        mptr = (mptr + 1) % 64;
      end
      @(negedge clk);
    end
    chk(wraps > 0 && clrs > 0, "wrap and pointer clear both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
