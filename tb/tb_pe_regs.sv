// Self-checking test of one channel's pin-electronics registers: random
// writes over the 24-address window (generator*8 + DSR0, DSR1, IC0-2, ECR,
// ECF; IOCtl at 7, Format at 15) must appear on the generator settings and
// read back; IOCtl reads back with the phase-detector result in bits 9:8;
// nothing changes without the channel select.
`timescale 1ns/1ps
module tb_pe_regs;
  import tr_pkg::*;
  logic clk = 0, rst = 1, sel = 0, wr_en = 0;
  logic [4:0] offset = 0;
  logic [7:0] wdata = 0, ioctl;
  logic [9:0] rdata;
  logic [1:0] pd_result = 0;
  dgen_cfg_t cfg_sample, cfg_width, cfg_delay, c;
  fmt_e fmt;
  logic [7:0] m [24];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pe_regs dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic dgen_cfg_t mcfg(input int g);
    dgen_cfg_t r;
    r.dsr = {m[g*8+1], m[g*8]};
    r.ic  = {m[g*8+4], m[g*8+3], m[g*8+2]};
    r.ecr = m[g*8+5];
    r.ecf = m[g*8+6];
    return r;
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 24; i++) m[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int o = $urandom_range(0, 23);
      @(negedge clk);
      sel = $urandom_range(0, 7) != 0; wr_en = 1; offset = 5'(o); wdata = 8'($urandom);
      pd_result = 2'($urandom);
      @(negedge clk);
      if (sel && o != 23) m[o] = wdata;
      wr_en = 0; sel = 1;
      chk(cfg_sample === mcfg(GEN_SAMPLE) && cfg_width === mcfg(GEN_WIDTH) &&
          cfg_delay === mcfg(GEN_DELAY), "generator settings");
      chk(ioctl === m[R_IOCTL], "IOCtl");
      chk(fmt === ((m[R_FORMAT][2:0] <= 4) ? fmt_e'(m[R_FORMAT][2:0]) : FMT_NRZ), "format");
      o = $urandom_range(0, 22); offset = 5'(o); #1;
      if (o == R_IOCTL) chk(rdata === {pd_result, m[o]}, "IOCtl read with phase result");
      else              chk(rdata === {2'b00, m[o]}, $sformatf("read back offset %0d", o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
