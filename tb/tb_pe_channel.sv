// Self-checking test of one pin-electronics channel with its pad looped
// back to its input. CycleClock 40 ns, Clock 10 ns (rising 5 ns after each
// cycle boundary), CycleClock/2 toggling at every boundary. Registers are
// written over the channel's register port. Checks: register read-back; in
// NRZ the pad changes 16 ns after the boundary (Delay line: first tap + 1 ns
// chain) and in RZ it returns low at 28 ns (Width line); the data acquired
// with the Sample line at 36 ns, or at 46 ns through the mid-cycle stage,
// comes out two cycles later; TTL mode moves the drive to the TTL pair;
// inhibit releases the pad; the phase detector reads an early RefClock as 0
// and a late one as 1 on a return-to-zero pad.
`timescale 1ns/1ps
module tb_pe_channel;
  import tr_pkg::*;
  localparam int TC = 40;
  logic clk = 0, rst = 1, sr_clk = 0, cyc2_clk = 0, ref_clk = 0;
  logic sel = 0, wr_en = 0, force_d = 0, inhibit = 1;
  logic [4:0] offset = 0;
  logic [7:0] wdata = 0;
  logic [9:0] rdata;
  logic acq, dut_in, cmos_pu, cmos_pd, ttl_pu, ttl_pd, pulse;
  logic pad = 0;
  int checks = 0, failures = 0, ref_phase = 10;
  realtime t_bound, t_up, t_down;
  bit fd [$];

  pe_channel dut (.*);

  always #(TC/2) clk = ~clk;
  always @(posedge clk) begin cyc2_clk <= ~cyc2_clk; t_bound = $realtime; end
  initial begin #5; forever begin sr_clk = 1; #5; sr_clk = 0; #5; end end
  always @(posedge clk) begin #(ref_phase); ref_clk = 1; #10; ref_clk = 0; end
  // pad model: the last driver switched on sets the level, released pad holds
  always @* if (cmos_pu || ttl_pu) pad = 1; else if (cmos_pd || ttl_pd) pad = 0;
  assign #1 dut_in = pad;
  always @(posedge pad) t_up = $realtime - t_bound;
  always @(negedge pad) t_down = $realtime - t_bound;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wreg(input int gen, input int off, input logic [7:0] v);
    @(negedge clk) sel = 1; wr_en = 1; offset = 5'(gen * 8 + off); wdata = v;
    @(negedge clk) wr_en = 0; sel = 0;
  endtask
  task automatic gen_set(input int gen, input int tap, input bit falling, input int ic);
    wreg(gen, R_DSR0, 8'(1 << tap));
    wreg(gen, R_DSR1, falling ? 8'h04 : 8'h08);
    wreg(gen, R_IC0, 8'(1 << ic)); wreg(gen, R_IC1, 0); wreg(gen, R_IC2, 0);
    wreg(gen, R_ECR, 8'h11); wreg(gen, R_ECF, 8'h11);
  endtask
  // run n cycles of random data; check acquire latency 2
  task automatic run_data(input int n, input string what);
    fd.delete();
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      force_d <= 1'($urandom);
      #1 fd.push_back(force_d);
      if (k >= 4) chk(acq === fd[k - 2], $sformatf("%s: acq cycle %0d", what, k));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    gen_set(GEN_DELAY, 0, 0, 0);       // 5 + 10 + 1 = 16 ns
    gen_set(GEN_WIDTH, 1, 0, 1);       // 5 + 20 + 1 + 2 = 28 ns
    gen_set(GEN_SAMPLE, 2, 0, 0);      // 36 ns
    wreg(0, R_FORMAT, 8'(FMT_NRZ));
    wreg(0, R_IOCTL, 0);
    // read-back
    @(negedge clk) sel = 1; offset = 5'(GEN_WIDTH * 8 + R_DSR0); #1 chk(rdata === 10'h002, "read DSR0");
    offset = 5'(R_FORMAT); #1 chk(rdata === 10'(FMT_NRZ), "read Format");
    sel = 0;
    inhibit = 0;
    repeat (10) @(posedge clk);
    // NRZ edge position and acquisition without the mid-cycle stage
    run_data(60, "NRZ");
    @(posedge clk) force_d <= 0; @(posedge clk) force_d <= 1;
    @(posedge clk) #(TC - 2) chk(t_up == 16.0, $sformatf("NRZ pad edge at %0.1f ns, want 16", t_up));
    // RZ: high from 16 to 28 ns
    wreg(0, R_FORMAT, 8'(FMT_RZ));
    force_d <= 1;
    repeat (3) @(posedge clk);
    #(TC - 2);
    chk(t_up == 16.0 && t_down == 28.0, $sformatf("RZ pulse %0.1f..%0.1f", t_up, t_down));
    // phase detector: RefClock rising at 10 ns (before the pad) then 20 ns
    ref_phase = 10; repeat (6) @(posedge clk);
    @(negedge clk) sel = 1; offset = 5'(R_IOCTL); #1 chk(rdata[8] === 1'b0, "RefClock before pad edge reads 0");
    sel = 0; ref_phase = 20; repeat (6) @(posedge clk);
    @(negedge clk) sel = 1; offset = 5'(R_IOCTL); #1 chk(rdata[8] === 1'b1, "RefClock after pad edge reads 1");
    sel = 0;
    // mid-cycle acquire stage with the sample at 46 ns
    wreg(0, R_FORMAT, 8'(FMT_NRZ));
    gen_set(GEN_SAMPLE, 3, 0, 0);
    wreg(0, R_IOCTL, 8'(1 << IO_MIDPIPE));
    repeat (10) @(posedge clk);
    run_data(60, "mid-cycle stage");
    // TTL drivers
    wreg(0, R_IOCTL, 8'(1 << IO_TTL_OUT));
    gen_set(GEN_SAMPLE, 2, 0, 0);
    repeat (10) @(posedge clk);
    for (int k = 0; k < 20; k++) begin
      @(posedge clk) force_d <= 1'($urandom);
      #(TC/2) chk(!cmos_pu && !cmos_pd && (ttl_pu || ttl_pd), "TTL pair drives");
    end
    run_data(30, "TTL");
    // inhibit
    inhibit = 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 10; k++) begin
      @(posedge clk) force_d <= 1'($urandom);
      #(TC/2) chk(!cmos_pu && !cmos_pd && !ttl_pu && !ttl_pd, "inhibit releases the pad");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
