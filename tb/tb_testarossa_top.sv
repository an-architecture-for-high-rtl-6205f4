// End-to-end test of the tester chip at full size (1K-word vector RAM, 16
// channels), driven only through its pins.
//
// Set-up over the host bus: every channel's three delay lines (force edge at
// 16 ns, pulse end at 28 ns, sample at 36 ns into a 40 ns cycle; Clock runs
// at 4x CycleClock), formats and IOCtl, the 16 control-map entries, and a
// compressed vector program written word by word into the vector RAM.
// Channel roles: 0-7 and 15 NRZ, 8 RZ, 9 RO, 10 RT, 11 RC, 12 RC with the
// mid-cycle option, 13 NRZ on the TTL drivers, 14 NRZ sampled at 46 ns
// through the mid-cycle acquire stage. Each pad is looped back to its input;
// a pad the chip does not drive reads 0 (the DUT pulls it low).
// Map: entries 0-13 drive everything and mask random channels (8-12 always
// masked); entry 14 inhibits and masks channels 0-3; entry 15 inhibits
// channel 5 without masking it, so a vector with index 15 and bit 5 set is a
// real failure. A reference model of the pads gives the expected error
// buffer contents, which are read back over the bus and compared.
//
// Run 1 stops at End; run 2 holds Loop for more than four passes of the loop
// body, then releases it and must stop after a whole number of passes, with
// the error buffer full; run 3 changes the map to mask the failing pin and
// runs the program again without Loop, so the error buffer records only
// what is left (the way further errors are reached). Checked on the way: one vector per CycleClock,
// first vector 4 clocks after Start, pads released until the first vector,
// each format's levels inside and outside the pulse, TTL pair, inhibit,
// mask, phase detector read-out, RAM, map and history read-back. Every
// mechanism is counted and one that never occurs is a failure.
`timescale 1ns/1ps
module tb_testarossa_top;
  import tr_pkg::*;
  import tb_fg_pkg::*;
  localparam int TC = 40;

  logic cycle_clk = 0, sr_clk = 0, cyc2_clk = 0, ref_clk = 0, reset = 1, start = 0, loop = 0;
  logic [9:0] io_ad_i = 0, io_ad_o;
  logic io_ad_oe, io_adr = 0, io_rd = 0, io_wr = 0, chip_sel = 0;
  logic [15:0] dut_in, pad_cmos_pu, pad_cmos_pd, pad_ttl_pu, pad_ttl_pd, pad;
  int checks = 0, failures = 0, ref_phase = 10;

  testarossa_top dut (.*);

  // ------------------------------------------------------------- clocks
  always #(TC/2) cycle_clk = ~cycle_clk;
  always @(posedge cycle_clk) cyc2_clk <= ~cyc2_clk;
  initial begin #(TC/2 + 5); forever begin sr_clk = 1; #5; sr_clk = 0; #5; end end
  always @(posedge cycle_clk) begin #(ref_phase); ref_clk = 1; #10; ref_clk = 0; end

  // ---------------------------------------------------------- pad model
  assign pad = pad_cmos_pu | pad_ttl_pu;        // undriven pads read 0
  assign #1 dut_in = pad;

  // ----------------------------------------------------- mechanism counts
  typedef enum int {M_LITERAL, M_LIT64, M_COPY, M_COPY_WRAP, M_STOP_AT_END, M_LOOP_TAKEN,
                    M_ERR_RECORD, M_ERR_FULL, M_NRZ, M_RZ, M_RO, M_RT, M_RC, M_RC_MID,
                    M_INHIBIT, M_MASK, M_TTL, M_MIDPIPE, M_PD_EARLY, M_PD_LATE,
                    M_VRAM_READ, M_MAP_READ, M_HIST_READ, M_RELEASED_AT_RESET, M_RERUN_MASKED,
                    M_N} mech_e;
  int mech [M_N];

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ------------------------------------------------------------ host bus
  task automatic gap(input int cycles);
    #(cycles * TC + $urandom_range(0, TC - 1));
  endtask
  task automatic bus_addr(input logic [9:0] a);
    chip_sel = 1; io_ad_i = a; gap(0); io_adr = 1; gap(3); io_adr = 0; gap(2);
  endtask
  task automatic bus_write(input logic [9:0] a, input logic [9:0] d);
    bus_addr(a);
    io_ad_i = d; gap(2);
    io_wr = 1; gap(3); io_wr = 0; gap(2);
    chip_sel = 0;
  endtask
  task automatic bus_read(input logic [9:0] a, output logic [9:0] d);
    bus_addr(a);
    io_ad_i = 10'($urandom); io_rd = 1; gap(4);
    chk(io_ad_oe, "read drives the bus");
    d = io_ad_o;
    io_rd = 0; gap(3);
    chip_sel = 0;
  endtask
  task automatic pe_write(input int ch, input int gen, input int off, input logic [7:0] v);
    bus_write(10'(ch * PE_REGS_PER_CH + gen * 8 + off), 10'(v));
  endtask
  task automatic gen_set(input int ch, input int gen, input int tap, input int ic);
    pe_write(ch, gen, R_DSR0, 8'(1 << tap));
    pe_write(ch, gen, R_DSR1, 8'h08);           // rising-edge final stage
    pe_write(ch, gen, R_IC0, 8'(1 << ic));
    pe_write(ch, gen, R_IC1, 0);
    pe_write(ch, gen, R_IC2, 0);
    pe_write(ch, gen, R_ECR, 8'h11);
    pe_write(ch, gen, R_ECF, 8'h11);
  endtask
  task automatic ext_write(input logic [9:0] a, input logic [39:0] w, input int ctl_bit);
    bus_write(A_EXTRADD, a);
    for (int k = 0; k < 4; k++) bus_write(A_RWD0 + 10'(k), w[10*k +: 10]);
    bus_write(A_EXTRCTL, 10'(1 << ctl_bit));
    bus_write(A_EXTRCTL, 0);
  endtask
  task automatic ext_read(input logic [9:0] a, input int ctl_bit, output logic [39:0] w);
    logic [9:0] d;
    bus_write(A_EXTRADD, a);
    bus_write(A_EXTRCTL, 10'(1 << ctl_bit));
    for (int k = 0; k < 4; k++) begin bus_read(A_RWD0 + 10'(k), d); w[10*k +: 10] = d; end
    bus_write(A_EXTRCTL, 0);
  endtask

  // ------------------------------------------------------ reference model
  logic [39:0] map_m [16];
  localparam logic [15:0] FMT_CH = 16'h1F00;    // channels 8-12

  function automatic logic [15:0] acq_model(input logic [19:0] v);
    logic [15:0] d = v[15:0], inh = map_m[v[19:16]][31:16], a;
    a = d;
    a[8]  = 1'b0;          // RZ: low outside the pulse
    a[9]  = 1'b1;          // RO: high outside the pulse
    a[10] = 1'b0;          // RT: released outside the pulse
    a[11] = !d[11];        // RC: complement outside the pulse
    a[12] = !d[12];        // RC, mid-cycle: complement of this cycle's bit
    return a & ~inh;
  endfunction
  function automatic bit err_model(input logic [19:0] v);
    logic [15:0] m = map_m[v[19:16]][15:0];
    return ((acq_model(v) ^ v[15:0]) & ~m) != 0;
  endfunction

  // ------------------------------------------------ run-time observation
  logic [19:0] got [$];
  int vcyc [$];
  int ccount = 0;
  bit watch = 0;
  always @(posedge cycle_clk) begin
    ccount <= ccount + 1;
    if (dut.vec_valid) begin got.push_back(dut.vec); vcyc.push_back(ccount); end
  end

  // Format checks inside (22 ns) and outside (10 ns, 36 ns) the pulse, from
  // the vector the chip is applying (stage B).
  logic [15:0] prev_b;
  always @(posedge cycle_clk) if (watch) begin
    logic [15:0] d, inh;
    #1 d = dut.force_b; inh = dut.inhibit_b;
    #9;                                           // 10 ns
    chk(pad[11] === !d[11], "RC low-true outside pulse before mid-cycle");
    chk(pad[12] === !prev_b[12], "RC mid-cycle option keeps the previous bit until mid-cycle");
    if (!inh[0]) chk(pad[0] === prev_b[0], "NRZ keeps the previous bit before the edge");
    #12;                                          // 22 ns: inside the pulse
    chk(pad[8] === d[8] && pad[9] === d[9] && pad[11] === d[11] && pad[12] === d[12],
        "RZ/RO/RC drive the bit inside the pulse");
    chk((pad_cmos_pu[10] || pad_cmos_pd[10]) && pad[10] === d[10], "RT drives inside the pulse");
    for (int c = 0; c < 16; c++) if (c < 8 || c > 12)
      if (!inh[c]) chk(pad[c] === d[c], $sformatf("NRZ channel %0d level", c));
      else begin
        chk(!pad_cmos_pu[c] && !pad_cmos_pd[c] && !pad_ttl_pu[c] && !pad_ttl_pd[c],
            "inhibited pad released");
        mech[M_INHIBIT]++;
      end
    chk(!pad_cmos_pu[13] && !pad_cmos_pd[13] && (pad_ttl_pu[13] || pad_ttl_pd[13]),
        "channel 13 on the TTL pair");
    mech[M_TTL]++;
    #14;                                          // 36 ns: outside the pulse
    chk(pad[8] === 1'b0 && pad[9] === 1'b1 && pad[11] === !d[11] && pad[12] === !d[12],
        "RZ/RO/RC levels outside the pulse");
    chk(!pad_cmos_pu[10] && !pad_cmos_pd[10], "RT released outside the pulse");
    mech[M_NRZ]++; mech[M_RZ]++; mech[M_RO]++; mech[M_RT]++; mech[M_RC]++; mech[M_RC_MID]++;
    prev_b = d;
  end

  // ------------------------------------------------------------ program
  logic [39:0] image [$];

  task automatic build(ref logic [19:0] v[$], input int pre_n, output int pre_words);
    int unsigned bytes [$];
    bit ok = 1;
    image.delete();
    st_lits = 0; st_copies = 0; st_lit64 = 0; st_wraps = 0;
    if (pre_n > 0) ok = compress_block(v, 0, pre_n, bytes);
    pre_words = bytes.size() / 4;
    ok &= compress_block(v, pre_n, v.size(), bytes);
    chk(ok, "compressor padding");
    pack_words(bytes, image);
    mech[M_LITERAL] += st_lits; mech[M_LIT64] += st_lit64;
    mech[M_COPY] += st_copies;  mech[M_COPY_WRAP] += st_wraps;
  endtask

  // random vectors, a stretch of 70 unrepeatable ones, and a periodic
  // stretch; indices 15 (real failures) limited to the random part
  task automatic make_stream(ref logic [19:0] v[$], input int n_rand, input int n_per);
    logic [19:0] pat [3];
    make_vectors(v, n_rand, 0);
    for (int k = 0; k < 70; k++) v.push_back({4'($urandom_range(0, 14)), 16'($urandom)});
    for (int k = 0; k < 3; k++) pat[k] = {4'($urandom_range(0, 14)), 16'($urandom)};
    for (int k = 0; k < n_per; k++) v.push_back(pat[k % 3]);
  endtask

  task automatic load(input int pre_words);
    for (int i = 0; i < image.size(); i++) ext_write(10'(i), image[i], XC_WRITE_VRAM);
    bus_write(A_LOOP, 10'(pre_words));
    bus_write(A_END, 10'(image.size() - 1));
  endtask

  task automatic check_errors(ref logic [19:0] v[$], input int n_delivered, input int pre_n,
                              input int body_n);
    logic [39:0] expd [$], w;
    logic [9:0] dbg;
    for (int i = 0; i < n_delivered && expd.size() < 16; i++) begin
      int src = (i < pre_n) ? i : pre_n + (i - pre_n) % body_n;
      if (err_model(v[src])) expd.push_back({24'(i), acq_model(v[src])});
    end
    for (int i = 0; i < n_delivered; i++) begin
      int src = (i < pre_n) ? i : pre_n + (i - pre_n) % body_n;
      logic [15:0] mk = map_m[v[src][19:16]][15:0];
      if (((acq_model(v[src]) ^ v[src][15:0]) & mk) != 0) mech[M_MASK]++;
      if (!mk[14]) mech[M_MIDPIPE]++;
    end
    bus_read(A_LOOP, dbg);                      // debug: running, full, count
    chk(dbg[9] == 0, "debug register shows the run ended");
    chk(dbg[8] == (expd.size() == 16), "error-buffer full flag");
    chk(expd.size() == 16 || int'(dbg[7:4]) == expd.size(), "error count");
    if (dbg[8]) mech[M_ERR_FULL]++;
    foreach (expd[k]) begin
      ext_read(10'(k), XC_READ_ERR, w);
      chk(w === expd[k], $sformatf("error entry %0d: %h expected %h", k, w, expd[k]));
      mech[M_ERR_RECORD]++;
    end
  endtask

  task automatic start_run(input bit with_loop, output int lat);
    got.delete(); vcyc.delete();
    loop = with_loop;
    @(negedge cycle_clk) start = 1;
    lat = 0;
    while (!dut.vec_valid && lat < 20) begin @(posedge cycle_clk); #1; lat++; end
    watch = 1;
    prev_b = dut.force_b;
  endtask

  task automatic end_run();
    int k = 0;
    while (dut.running && k < 100000) begin @(posedge cycle_clk); k++; end
    repeat (6) @(posedge cycle_clk);
    watch = 0;
    @(negedge cycle_clk) start = 0;
    chk(vcyc.size() > 0 && vcyc[$] - vcyc[0] + 1 == vcyc.size(),
        $sformatf("%0d vectors in %0d clocks", vcyc.size(), vcyc[$] - vcyc[0] + 1));
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    logic [19:0] v [$];
    logic [39:0] w;
    logic [9:0]  d, hadd;
    int pre_words, lat, n;

    repeat (4) @(posedge cycle_clk);
    @(negedge cycle_clk) reset = 0;
    repeat (4) @(posedge cycle_clk);
    chk((pad_cmos_pu | pad_cmos_pd | pad_ttl_pu | pad_ttl_pd) == 0, "pads released after reset");
    mech[M_RELEASED_AT_RESET]++;

    // channels
    for (int c = 0; c < 16; c++) begin
      automatic fmt_e f = FMT_NRZ;
      automatic logic [7:0] io = 0;
      gen_set(c, GEN_DELAY, 0, 0);                 // 16 ns
      gen_set(c, GEN_WIDTH, 1, 1);                 // 28 ns
      gen_set(c, GEN_SAMPLE, c == 14 ? 3 : 2, 0);  // 36 ns (46 ns)
      case (c)
        8: f = FMT_RZ;   9: f = FMT_RO;   10: f = FMT_RT;   11: f = FMT_RC;
        12: begin f = FMT_RC; io[IO_RC_MID] = 1; end
        13: io[IO_TTL_OUT] = 1;
        14: io[IO_MIDPIPE] = 1;
        default: ;
      endcase
      pe_write(c, 0, R_FORMAT, 8'(f));
      pe_write(c, 0, R_IOCTL, io);
    end
    bus_read(10'(3 * PE_REGS_PER_CH + GEN_WIDTH * 8 + R_DSR0), d);
    chk(d === 10'h002, "pin-electronics register read-back");

    // control map
    for (int i = 0; i < 16; i++) begin
      automatic logic [15:0] inh = 0, m = 16'($urandom) & 16'($urandom) & ~16'h4000;
      if (i == 14) begin inh = 16'h000F; m = 16'h000F; end
      if (i == 15) begin inh = 16'h0020; m = 0; end
      m |= FMT_CH;
      map_m[i] = {8'h00, inh, m};
      ext_write(10'(i), map_m[i], XC_WRITE_MAP);
    end
    for (int i = 0; i < 16; i += 5) begin
      ext_read(10'(i), XC_READ_MAP, w);
      chk(w === map_m[i], $sformatf("map entry %0d read-back", i));
      mech[M_MAP_READ]++;
    end

    // ---------------- run 1: straight program, stop at End
    make_stream(v, 200, 120);
    v.push_back({4'd0, 16'hFFFF});                 // last vector stays on the pads
    build(v, 0, pre_words);
    load(0);
    for (int i = 0; i < 4; i++) begin
      ext_read(10'(i * 7), XC_READ_VRAM, w);
      chk(w === image[i * 7], $sformatf("vector RAM word %0d read-back", i * 7));
      mech[M_VRAM_READ]++;
    end
    start_run(0, lat);
    chk(lat == 4, $sformatf("first vector %0d clocks after Start, expected 4", lat));
    end_run();
    chk(got.size() == v.size(), $sformatf("run 1 delivered %0d of %0d", got.size(), v.size()));
    if (got.size() == v.size()) mech[M_STOP_AT_END]++;
    n = 0;
    foreach (got[i]) if (i < v.size() && got[i] !== v[i]) n++;
    chk(n == 0, $sformatf("%0d vectors differ in run 1", n));
    check_errors(v, got.size(), 0, v.size());
    // history: the last vector sits just below the write pointer
    bus_read(A_EXTRADD, hadd);
    ext_read(10'((hadd - 1) & 10'h3F), XC_READ_HIST, w);
    chk(w[19:0] === v[$], "history buffer read-back of the last vector");
    mech[M_HIST_READ]++;
    // phase detector on the RZ channel: pad high 16..28 ns (+1 ns wire)
    ref_phase = 10; repeat (8) @(posedge cycle_clk);
    bus_read(10'(8 * PE_REGS_PER_CH + R_IOCTL), d);
    chk(d[8] === 1'b0, "RefClock before the pad edge reads 0");
    if (d[8] === 1'b0) mech[M_PD_LATE]++;
    ref_phase = 20; repeat (8) @(posedge cycle_clk);
    bus_read(10'(8 * PE_REGS_PER_CH + R_IOCTL), d);
    chk(d[8] === 1'b1, "RefClock after the pad edge reads 1");
    if (d[8] === 1'b1) mech[M_PD_EARLY]++;
    ref_phase = 10;

    // ---------------- run 2: lead-in block plus loop body, Loop held
    begin
      logic [19:0] v2 [$];
      int pre_n = 90, body_n, passes;
      make_vectors(v2, pre_n, 0);
      make_stream(v2, 120, 60);
      body_n = v2.size() - pre_n;
      // every 17th body vector is a real failure (index 15, channel 5 high),
      // so the loop passes overflow the error buffer
      for (int i = pre_n + 3; i < v2.size(); i += 17) v2[i] = {4'd15, v2[i][15:6], 1'b1, v2[i][4:0]};
      build(v2, pre_n, pre_words);
      load(pre_words);
      start_run(1, lat);
      while (got.size() < pre_n + 4 * body_n + body_n / 2) @(posedge cycle_clk);
      @(negedge cycle_clk) loop = 0;
      end_run();
      passes = (got.size() - pre_n) / body_n;
      chk(got.size() > pre_n && (got.size() - pre_n) % body_n == 0 && passes >= 3,
          $sformatf("run 2 delivered %0d (lead-in %0d, body %0d)", got.size(), pre_n, body_n));
      if (passes >= 3) mech[M_LOOP_TAKEN] += passes - 1;
      n = 0;
      foreach (got[i]) begin
        automatic int src = (i < pre_n) ? i : pre_n + (i - pre_n) % body_n;
        if (got[i] !== v2[src]) n++;
      end
      chk(n == 0, $sformatf("%0d vectors differ in run 2", n));
      check_errors(v2, got.size(), pre_n, body_n);

      // ---------------- run 3: mask the failing pin in the map and re-run
      begin
        automatic int n_old = 0, n_new = 0, tot = pre_n + body_n;
        for (int i = 0; i < tot; i++) if (err_model(v2[i])) n_old++;
        map_m[15][5] = 1'b1;                     // entry 15 now masks channel 5
        ext_write(10'd15, map_m[15], XC_WRITE_MAP);
        for (int i = 0; i < tot; i++) if (err_model(v2[i])) n_new++;
        start_run(0, lat);
        end_run();
        chk(got.size() == tot, $sformatf("run 3 delivered %0d of %0d", got.size(), tot));
        n = 0;
        foreach (got[i]) if (i < tot && got[i] !== v2[i]) n++;
        chk(n == 0, $sformatf("%0d vectors differ in run 3", n));
        check_errors(v2, got.size(), pre_n, body_n);
        if (n_new < n_old) mech[M_RERUN_MASKED]++;
        $display("run 3: %0d failing cycles before the map change, %0d after", n_old, n_new);
      end
    end

    for (int m = 0; m < M_N; m++) begin
      chk(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-20s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
