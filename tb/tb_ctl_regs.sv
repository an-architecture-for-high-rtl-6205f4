// Self-checking test of the decompressor control registers: writes to Loop,
// End, ExtRAdd, RWD0-3 and DCtl reach their outputs; ExtRCtl bits drive
// WriteVRam/ReadVRam as levels and the map write as a one-clock pulse on a
// rising bit; rising read bits (map, history, error buffer) and a finished
// RAM read load the read-data register, which reads back as RRD0-3; the
// status registers read back what is presented.
`timescale 1ns/1ps
module tb_ctl_regs;
  import tr_pkg::*;
  logic clk = 0, rst = 1, wr_en = 0;
  logic [9:0] addr = 0, wdata = 0, rdata, loop_addr, end_addr, dctl, ext_radd;
  logic [39:0] ext_wdata, vram_rdata = 0, map_rdata = 0, err_rdata = 0;
  logic write_vram, read_vram, vram_read_done = 0, map_we;
  logic [19:0] hist_rdata = 0;
  logic running = 0, err_full = 0;
  logic [3:0] err_count = 0, pf_count = 0;
  logic [9:0] vadd = 0, cmd = 0;
  logic [5:0] hadd = 0;
  int checks = 0, failures = 0, map_pulses = 0;
  always #5 clk = ~clk;
  ctl_regs dut (.*);
  always @(negedge clk) if (map_we) map_pulses++;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [9:0] a, input logic [9:0] d);
    @(negedge clk) addr = a; wdata = d; wr_en = 1;
    @(negedge clk) wr_en = 0;
  endtask
  task automatic rd_rrd(output logic [39:0] v);
    for (int k = 0; k < 4; k++) begin addr = A_RWD0 + 10'(k); #1; v[10*k +: 10] = rdata; end
  endtask
  initial begin
    logic [39:0] v, w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 50; n++) begin
      automatic logic [9:0] a = 10'($urandom), b = 10'($urandom), c = 10'($urandom), d = 10'($urandom);
      w = {8'($urandom), 32'($urandom)};
      wr(A_LOOP, a); wr(A_END, b); wr(A_EXTRADD, c); wr(A_DCTL, d);
      for (int k = 0; k < 4; k++) wr(A_RWD0 + 10'(k), w[10*k +: 10]);
      chk(loop_addr === a && end_addr === b && ext_radd === c && dctl === d, "address registers");
      chk(ext_wdata === w, "write data register");
      // RAM write and read levels
      wr(A_EXTRCTL, 10'(1 << XC_WRITE_VRAM));
      chk(write_vram && !read_vram, "WriteVRam level");
      wr(A_EXTRCTL, 10'(1 << XC_READ_VRAM));
      chk(!write_vram && read_vram, "ReadVRam level");
      vram_rdata = {8'($urandom), 32'($urandom)};
      @(negedge clk) vram_read_done = 1;
      @(negedge clk) vram_read_done = 0;
      rd_rrd(v); chk(v === vram_rdata, "RAM read data");
      // map write pulse
      wr(A_EXTRCTL, 0);
      begin
        int p;
        p = map_pulses;
        wr(A_EXTRCTL, 10'(1 << XC_WRITE_MAP));
        repeat (3) @(negedge clk);
        chk(map_pulses == p + 1, $sformatf("one map write per rising bit, saw %0d", map_pulses - p));
      end
      map_rdata = {8'($urandom), 32'($urandom)};
      wr(A_EXTRCTL, 10'(1 << XC_READ_MAP)); @(negedge clk);
      rd_rrd(v); chk(v === map_rdata, "map read data");
      hist_rdata = 20'($urandom);
      wr(A_EXTRCTL, 10'(1 << XC_READ_HIST)); @(negedge clk);
      rd_rrd(v); chk(v === 40'(hist_rdata), "history read data");
      err_rdata = {8'($urandom), 32'($urandom)};
      wr(A_EXTRCTL, 10'(1 << XC_READ_ERR)); @(negedge clk);
      rd_rrd(v); chk(v === err_rdata, "error buffer read data");
      // status
      running = 1'($urandom); err_full = 1'($urandom); err_count = 4'($urandom);
      pf_count = 4'($urandom); vadd = 10'($urandom); hadd = 6'($urandom); cmd = 10'($urandom);
      addr = A_LOOP;    #1 chk(rdata === {running, err_full, err_count, pf_count}, "debug register");
      addr = A_END;     #1 chk(rdata === vadd, "VAdd");
      addr = A_EXTRADD; #1 chk(rdata === {4'd0, hadd}, "HAdd");
      addr = A_EXTRCTL; #1 chk(rdata === cmd, "Cmd");
      wr(A_EXTRCTL, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
