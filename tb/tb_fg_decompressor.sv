// Self-checking test of the Fiala-Greene decompressor.
//
// Vector streams (repeats, counters, random stretches) are compressed by the
// reference compressor in tb_fg_pkg, loaded into a RAM model with one clock
// read latency, and run. Checks: every delivered vector equals the source in
// order; the first vector appears 4 clocks after Start rises; with the RAM
// free the output is one vector per clock with no gap, also across the Loop
// branch; with Loop held the loop body repeats and the run ends after End
// once Loop is released; random RAM busy cycles only slow the output down;
// a second rising Start restarts from word 0. Literal-of-64 and wrapping
// Copy commands must both occur.
`timescale 1ns/1ps
module tb_fg_decompressor;
  import tb_fg_pkg::*;

  logic clk = 0, rst = 1, start = 0, loop_en = 0, ram_busy = 0;
  logic [9:0] loop_addr = 0, end_addr = 0;
  logic ram_req;
  logic [9:0] ram_addr;
  logic [39:0] ram_rdata;
  logic vec_valid, running, stall;
  logic [19:0] vec;
  logic [19:0] hist_host_rdata;
  logic [5:0]  hadd;
  logic [9:0]  cmd;
  logic [4:0]  pf_count;

  int checks = 0, failures = 0;
  logic [39:0] mem [1024];
  logic [19:0] got [$];
  int first_cyc, last_cyc, cyc = 0;
  int busy_pct = 0;

  always #5 clk = ~clk;

  fg_decompressor dut (
    .clk, .rst, .start, .loop_en, .loop_addr, .end_addr,
    .ram_req, .ram_addr, .ram_busy, .ram_rdata,
    .vec_valid, .vec, .running,
    .hist_host_addr(6'd0), .hist_host_rdata, .hadd, .cmd, .pf_count, .stall
  );

  always_ff @(posedge clk) if (ram_req) ram_rdata <= mem[ram_addr];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ram_busy <= ($urandom_range(0, 99) < busy_pct);
    if (vec_valid) begin
      if (got.size() == 0) first_cyc = cyc;
      last_cyc = cyc;
      got.push_back(vec);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // pre_n vectors before the loop target, body_n in the loop body.
  // passes > 0: hold Loop until that many passes plus half are out.
  task automatic run_test(input int pre_n, input int body_n, input int passes, input int busy);
    logic [19:0] v [$];
    int unsigned bytes [$];
    logic [39:0] words [$];
    int pre_words, tot, k, lat;
    bit ok;
    make_vectors(v, pre_n + body_n, $urandom);
    ok = 1;
    if (pre_n > 0) ok = compress_block(v, 0, pre_n, bytes);
    pre_words = bytes.size() / 4;
    ok &= compress_block(v, pre_n, pre_n + body_n, bytes);
    check(ok, "compressor could not pad a block");
    pack_words(bytes, words);
    foreach (words[i]) mem[i] = words[i];
    loop_addr = 10'(pre_words);
    end_addr  = 10'(words.size() - 1);
    loop_en   = (passes > 0);
    busy_pct  = busy;
    got.delete();
    @(negedge clk) start = 1;
    lat = 0;
    while (!vec_valid && lat < 20) begin @(posedge clk); #1; lat++; end
    if (busy == 0) check(lat == 4, $sformatf("first vector after %0d clocks, expected 4", lat));
    if (passes > 0) begin
      k = 0;
      while (got.size() < pre_n + passes * body_n + body_n / 2 && k < 100000) begin
        @(posedge clk); k++;
      end
      @(negedge clk) loop_en = 0;
    end
    k = 0;
    while (running && k < 100000) begin @(posedge clk); #1; k++; end
    repeat (3) @(posedge clk);
    check(!running, "run did not end");
    start = 0;
    // expected: pre, then the body a whole number of times
    tot = got.size();
    check(tot >= pre_n + body_n && (tot - pre_n) % body_n == 0,
          $sformatf("%0d vectors delivered for pre %0d body %0d", tot, pre_n, body_n));
    if (passes > 0) check((tot - pre_n) / body_n >= passes + 1, "loop body did not repeat");
    else            check(tot == pre_n + body_n, "stopped late or early without Loop");
    for (int i = 0; i < tot; i++) begin
      int src = (i < pre_n) ? i : pre_n + (i - pre_n) % body_n;
      if (got[i] !== v[src]) begin
        check(0, $sformatf("vector %0d: got %h expected %h", i, got[i], v[src]));
        break;
      end
    end
    checks++;
    if (busy == 0)
      check(last_cyc - first_cyc + 1 == tot,
            $sformatf("%0d vectors took %0d clocks", tot, last_cyc - first_cyc + 1));
    $display("run pre=%0d body=%0d words=%0d vectors=%0d busy=%0d%%", pre_n, body_n,
             words.size(), tot, busy);
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2) @(posedge clk);
    run_test(0, 700, 0, 0);          // straight run, stop at End
    run_test(120, 300, 2, 0);        // loop with a lead-in block
    run_test(0, 250, 3, 0);          // whole program is the loop
    run_test(200, 200, 1, 30);       // RAM busy 30% of clocks
    run_test(64, 900, 0, 0);
    check(st_lit64 > 0, "no Literal of 64 vectors was exercised");
    check(st_wraps > 0, "no wrapping Copy was exercised");
    check(st_copies > 0 && st_lits > 0, "both command kinds exercised");
    $display("literals=%0d lit64=%0d copies=%0d wraps=%0d splits=%0d",
             st_lits, st_lit64, st_copies, st_wraps, st_splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
