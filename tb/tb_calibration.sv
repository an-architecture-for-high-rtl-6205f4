// Calibration of one channel against RefClock, the way the host software
// does it: only register writes and reads of the phase-detector result.
//
// The channel runs RZ with force data 1, so the pad rises at the Delay
// line's time and falls at the Width line's time in every cycle. For a
// rising edge the host places RefClock's rising edge at a random target
// time and searches the Delay line settings from the coarsest stage to the
// finest (shift-register tap and final stage, inverter-chain tap, edge
// adjust coarse tap, edge adjust fine tap), each time keeping the largest
// setting at which the pad still reads high at the RefClock edge. For a
// falling edge the same is done with the Width line against RefClock's
// falling edge. The edge at the sensed pad must end up no later than the
// reference edge and less than one fine step (0.6 ns) before it: the
// resolution limit of the delay generator. The rising and falling edge
// adjusters get the same setting, because a line's output edge alternates
// in polarity from one cycle to the next. The pad is seen 1 ns after the
// drivers switch, so board and driver delay are calibrated out too.
// Second part, independent edges: with RefClock at half the cycle rate it
// rises in the cycles where the Delay line makes a rising edge (ECR) and
// falls in the others (ECF), at two different targets; the rising-edge
// result sets the common stages and ECR, the falling-edge result then ECF
// alone, and both pad edges must meet their own target.
// An edge exactly on the reference may read either way (1 ps tolerance).
// CycleClock 40 ns, Clock 10 ns with its rising edge 5 ns after the boundary.
`timescale 1ns/1ps
module tb_calibration;
  import tr_pkg::*;
  localparam int TC = 40;
  logic clk = 0, rst = 1, sr_clk = 0, cyc2_clk = 0, ref_clk = 0;
  logic sel = 0, wr_en = 0, force_d = 1, inhibit = 0;
  logic [4:0] offset = 0;
  logic [7:0] wdata = 0;
  logic [9:0] rdata;
  logic acq, dut_in, cmos_pu, cmos_pd, ttl_pu, ttl_pd, pulse;
  logic pad = 0;
  int checks = 0, failures = 0, steps = 0;
  realtime ref_rise = 20.0, ref_fall = 30.0, t_bound, t_up, t_down;

  pe_channel dut (.*);

  always #(TC/2) clk = ~clk;
  always @(posedge clk) begin cyc2_clk <= ~cyc2_clk; t_bound = $realtime; end
  initial begin #5; forever begin sr_clk = 1; #5; sr_clk = 0; #5; end end
  bit half_rate = 0;
  always @(posedge clk) begin
    if (!half_rate) begin
      #(ref_rise) ref_clk = 1;
      #(ref_fall - ref_rise) ref_clk = 0;
    end else if (!cyc2_clk) begin       // old value: it goes high at this edge
      #(ref_rise) ref_clk = 1;
    end else begin
      #(ref_fall) ref_clk = 0;
    end
  end
  realtime t_up_c [2];    // pad rise time in cycles with CycleClock/2 low/high
  always @(posedge dut_in) t_up_c[cyc2_clk] = $realtime - t_bound;
  always @* if (cmos_pu || ttl_pu) pad = 1; else if (cmos_pd || ttl_pd) pad = 0;
  assign #1 dut_in = pad;
  always @(posedge dut_in) t_up = $realtime - t_bound;
  always @(negedge dut_in) t_down = $realtime - t_bound;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wreg(input int gen, input int off, input logic [7:0] v);
    @(negedge clk) sel = 1; wr_en = 1; offset = 5'(gen * 8 + off); wdata = v;
    @(negedge clk) wr_en = 0; sel = 0;
  endtask

  // A delay setting: sr = 0..19 in order of delay (even: falling final stage,
  // half a Clock period less), ic 0..19, ec coarse 0..3, ec fine 0..3.
  typedef struct { int sr, ic, c, f; } setting_t;

  task automatic apply(input int gen, input setting_t s, input int fc = -1, input int ff = -1);
    wreg(gen, R_DSR0, 8'(1 << (s.sr / 2)));
    wreg(gen, R_DSR1, 8'(((s.sr / 2) >= 8 ? (1 << (s.sr / 2 - 8)) : 0) |
                         ((s.sr % 2 == 0) ? 8'h04 : 8'h08)));
    wreg(gen, R_IC0, (s.ic < 8)  ? 8'(1 << s.ic) : 8'h00);
    wreg(gen, R_IC1, (s.ic >= 8 && s.ic < 16) ? 8'(1 << (s.ic - 8)) : 8'h00);
    wreg(gen, R_IC2, (s.ic >= 16) ? 8'(1 << (s.ic - 16)) : 8'h00);
    wreg(gen, R_ECR, 8'((1 << s.c) | (16 << s.f)));
    wreg(gen, R_ECF, (fc < 0) ? 8'((1 << s.c) | (16 << s.f)) : 8'((1 << fc) | (16 << ff)));
  endtask

  // true when the pad edge is earlier than the reference edge
  task automatic early(input int gen, input setting_t s, input bit falling, output bit e);
    apply(gen, s);
    repeat (6) @(posedge clk);
    @(negedge clk) sel = 1; offset = 5'(R_IOCTL);
    #1 e = falling ? !rdata[9] : rdata[8];
    sel = 0;
    steps++;
  endtask

  task automatic calibrate(input int gen, input bit falling, output setting_t best);
    setting_t s = '{0, 0, 0, 0};
    bit e;
    // each stage: largest value that is still early (the next one is late)
    for (int v = 1; v < 20; v++) begin s.sr = v; early(gen, s, falling, e); if (!e) begin s.sr = v - 1; break; end end
    for (int v = 1; v < 20; v++) begin s.ic = v; early(gen, s, falling, e); if (!e) begin s.ic = v - 1; break; end end
    for (int v = 1; v < 4;  v++) begin s.c  = v; early(gen, s, falling, e); if (!e) begin s.c  = v - 1; break; end end
    for (int v = 1; v < 4;  v++) begin s.f  = v; early(gen, s, falling, e); if (!e) begin s.f  = v - 1; break; end end
    apply(gen, s);
    best = s;
  endtask

  initial begin
    setting_t cal;
    realtime err;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // start points: pad rises early (Delay at 11 ns), falls late (Width at 36 ns)
    apply(GEN_DELAY, '{0, 0, 0, 0});
    apply(GEN_WIDTH, '{5, 0, 0, 0});
    apply(GEN_SAMPLE, '{4, 0, 0, 0});
    wreg(0, R_FORMAT, 8'(FMT_RZ));
    wreg(0, R_IOCTL, 0);
    for (int n = 0; n < 10; n++) begin
      // rising edge of the pad against RefClock's rising edge
      ref_rise = real'($urandom_range(13000, 24000)) / 1000.0;
      ref_fall = 37.0;
      calibrate(GEN_DELAY, 0, cal);
      repeat (4) @(posedge clk); #(TC - 1);
      err = ref_rise - t_up;
      chk(err > -0.001 && err < 0.6, $sformatf("rise target %0.3f: pad at %0.3f (sr %0d ic %0d c %0d f %0d)",
                                             ref_rise, t_up, cal.sr, cal.ic, cal.c, cal.f));
      $display("rise target %0.3f ns -> pad %0.3f ns, error %0.3f ns", ref_rise, t_up, err);
      // falling edge of the pad against RefClock's falling edge
      ref_rise = 3.0;
      ref_fall = real'($urandom_range(30000, 38000)) / 1000.0;
      apply(GEN_WIDTH, '{2, 0, 0, 0});
      calibrate(GEN_WIDTH, 1, cal);
      repeat (4) @(posedge clk); #(TC - 1);
      err = ref_fall - t_down;
      chk(err > -0.001 && err < 0.6, $sformatf("fall target %0.3f: pad at %0.3f (sr %0d ic %0d c %0d f %0d)",
                                             ref_fall, t_down, cal.sr, cal.ic, cal.c, cal.f));
      $display("fall target %0.3f ns -> pad %0.3f ns, error %0.3f ns", ref_fall, t_down, err);
      apply(GEN_DELAY, '{0, 0, 0, 0});
      apply(GEN_WIDTH, '{5, 0, 0, 0});
    end
    // Independent edges: RefClock at half the cycle rate rises at t1 in the
    // cycles where the Delay line makes a rising edge and falls at t2 in the
    // others, so the rising-edge result calibrates the line with ECR and the
    // falling-edge result then sets ECF alone, to a different time.
    half_rate = 1;
    ref_fall = 37.0;
    for (int n = 0; n < 6; n++) begin
      automatic setting_t s;
      automatic bit e;
      automatic int fc = 0, ff = 0;
      automatic realtime t1 = real'($urandom_range(14000, 24000)) / 1000.0;
      automatic realtime t2 = t1 + real'($urandom_range(0, 5000)) / 1000.0;
      ref_rise = t1; ref_fall = t1;
      apply(GEN_DELAY, '{0, 0, 0, 0});
      calibrate(GEN_DELAY, 0, s);
      ref_fall = t2;
      for (int v = 1; v < 4; v++) begin
        apply(GEN_DELAY, s, v, 0); repeat (6) @(posedge clk);
        @(negedge clk) sel = 1; offset = 5'(R_IOCTL); #1 e = rdata[9]; sel = 0; steps++;
        if (!e) break;
        fc = v;
      end
      for (int v = 1; v < 4; v++) begin
        apply(GEN_DELAY, s, fc, v); repeat (6) @(posedge clk);
        @(negedge clk) sel = 1; offset = 5'(R_IOCTL); #1 e = rdata[9]; sel = 0; steps++;
        if (!e) break;
        ff = v;
      end
      apply(GEN_DELAY, s, fc, ff);
      repeat (6) @(posedge clk); #(TC - 1);
      chk(t1 - t_up_c[1] > -0.001 && t1 - t_up_c[1] < 0.6,
          $sformatf("ECR edge: target %0.3f pad %0.3f", t1, t_up_c[1]));
      chk(t2 - t_up_c[0] > -0.001 && t2 - t_up_c[0] < 0.6,
          $sformatf("ECF edge: target %0.3f pad %0.3f", t2, t_up_c[0]));
      $display("edges: targets %0.3f / %0.3f ns -> pad %0.3f / %0.3f ns", t1, t2, t_up_c[1], t_up_c[0]);
    end
    $display("%0d phase-detector readings", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
