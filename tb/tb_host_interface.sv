// Self-checking test of the host bus interface. A host model runs the
// multiplexed protocol with edges placed at random points of the clock
// period: address phase (IOAdr high), then data with IOWrite, or IORead.
// Every internal write must carry the latched address and the data, and
// nothing else may be written; reads must drive the selected register's
// contents with the output enable; nothing happens without ChipSelect.
`timescale 1ns/1ps
module tb_host_interface;
  logic clk = 0, rst = 1;
  logic [9:0] io_ad_i = 0, rdata, io_ad_o, addr, wdata;
  logic io_adr = 0, io_rd = 0, io_wr = 0, chip_sel = 0;
  logic io_ad_oe, addr_valid, wr_en;
  int checks = 0, failures = 0, writes_seen = 0, bad_writes = 0;
  logic [9:0] exp_addr, exp_data;
  bit write_window = 0;
  always #5 clk = ~clk;
  host_interface dut (.clk, .rst, .io_ad_i, .io_adr, .io_rd, .io_wr, .chip_sel, .rdata,
                      .io_ad_o, .io_ad_oe, .addr, .addr_valid, .wr_en, .wdata);
  assign rdata = addr ^ 10'h2A5;          // register file stand-in
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  always @(posedge clk) if (wr_en) begin
    writes_seen++;
    if (!write_window || addr !== exp_addr || wdata !== exp_data) bad_writes++;
  end
  task automatic gap(input int clocks);
    #(clocks * 10 + $urandom_range(0, 9));
  endtask
  task automatic bus_addr(input logic [9:0] a, input bit cs);
    chip_sel = cs; io_ad_i = a; gap(1); io_adr = 1; gap(4); io_adr = 0; gap(3);
  endtask
  task automatic bus_write(input logic [9:0] a, input logic [9:0] d, input bit cs);
    bus_addr(a, cs);
    io_ad_i = d; gap(3);
    exp_addr = a; exp_data = d; write_window = cs;
    io_wr = 1; gap(4); io_wr = 0; gap(4);
    write_window = 0; chip_sel = 0; gap(1);
  endtask
  task automatic bus_read(input logic [9:0] a, output logic [9:0] d, output bit oe);
    bus_addr(a, 1);
    io_ad_i = 10'($urandom); io_rd = 1;
    #1 chk(io_ad_oe && io_ad_o === (a ^ 10'h2A5), "read data on the bus 1 ns after IORead");
    gap(5);
    d = io_ad_o; oe = io_ad_oe;
    io_rd = 0; gap(4);
    chk(!io_ad_oe, "output released after IORead");
    chip_sel = 0; gap(1);
  endtask
  initial begin
    int n_wr = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    gap(2);
    chk(!io_ad_oe && !wr_en, "quiet after reset");
    for (int n = 0; n < 300; n++) begin
      automatic logic [9:0] a = 10'($urandom), d = 10'($urandom);
      logic [9:0] r;
      bit oe;
      automatic bit cs = $urandom_range(0, 5) != 0;
      if ($urandom_range(0, 1)) begin
        automatic int n_before = writes_seen;
        bus_write(a, d, cs);
        chk(cs ? writes_seen > n_before : writes_seen == n_before, "write happens iff ChipSelect");
        if (cs) n_wr++;
      end else begin
        bus_read(a, r, oe);
        chk(oe && r === (a ^ 10'h2A5), $sformatf("read of %h", a));
        chk(addr === a, "address latched");
      end
    end
    chk(bad_writes == 0, $sformatf("%0d writes with wrong address or data", bad_writes));
    chk(n_wr > 0, "writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
