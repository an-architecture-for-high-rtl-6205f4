// Self-checking test of the 1K x 40 vector RAM: random writes and reads
// against a reference array; read data must appear one clock after the read
// and hold while no read is made.
`timescale 1ns/1ps
module tb_vector_ram;
  logic clk = 0, we = 0, re = 0;
  logic [9:0]  addr = 0;
  logic [39:0] wdata = 0, rdata, expd;
  logic [39:0] model [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vector_ram dut (.clk, .we, .re, .addr, .wdata, .rdata);
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) we = 1; addr = 10'(i); wdata = {8'($urandom), 32'($urandom)};
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0); re = !we && $urandom_range(0, 1);
      addr = 10'($urandom); wdata = {8'($urandom), 32'($urandom)};
      if (we) model[addr] = wdata;
      if (re) begin
        expd = model[addr];
        @(posedge clk); #1;
        checks++;
        if (rdata !== expd) begin failures++; $display("FAIL read %0d", addr); end
        we = 0; re = 0; addr = 10'($urandom);
        @(posedge clk); #1;                       // no read: data holds
        checks++;
        if (rdata !== expd) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
