// Self-checking test of the 16-entry control map: host writes and reads of
// the 40-bit entries, and the registered inhibit (bits 31:16) and mask
// (bits 15:0) lookup selected by the vector's 4-bit index, one clock after
// the index, holding when no vector is read.
`timescale 1ns/1ps
module tb_control_map;
  logic clk = 0, rd_en = 0, host_we = 0;
  logic [3:0] idx = 0, host_addr = 0;
  logic [15:0] inhibit, mask;
  logic [39:0] host_wdata = 0, host_rdata;
  logic [39:0] model [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  control_map dut (.clk, .rd_en, .idx, .inhibit, .mask, .host_we, .host_addr, .host_wdata, .host_rdata);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) host_we = 1; host_addr = 4'(i); host_wdata = {8'($urandom), 32'($urandom)};
      model[i] = host_wdata;
    end
    @(negedge clk) host_we = 0;
    for (int i = 0; i < 16; i++) begin
      host_addr = 4'(i); #1; chk(host_rdata === model[i], "host read");
    end
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] k;
      @(negedge clk);
      k = 4'($urandom); idx = k; rd_en = 1;
      @(posedge clk); #1;
      chk(inhibit === model[k][31:16] && mask === model[k][15:0], $sformatf("lookup %0d", k));
      @(negedge clk) rd_en = 0; idx = 4'($urandom);
      @(posedge clk); #1;
      chk(inhibit === model[k][31:16], "hold without read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
