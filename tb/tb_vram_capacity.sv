// Capacity workloads of the full-size vector store: the 1K x 40 vector RAM
// and the decompressor at their default sizes, loaded to (nearly) the last
// word and run to the end.
//
// Workload 1, uncompressible data: 2032 distinct random-looking vectors. With no repeats the
// stream is 31 Literals of 64 vectors (129 bytes each) and one Literal of
// 48 (97 bytes), 4096 bytes = exactly 1024 words, the most random vectors the
// RAM can hold.
// Workload 2, nominal capacity: 10,000 vectors shaped like a test program
// (a free-running clock pin, a slow counter, bus values held for several
// cycles, repeated bursts), which compress about 5:1 and must fit in the
// 1024 words.
// For each: the image fits, every vector comes out in order, one per clock,
// the first 4 clocks after Start, and the run ends at the last word.
`timescale 1ns/1ps
module tb_vram_capacity;
  import tr_pkg::*;
  import tb_fg_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic ram_req, vec_valid, running, stall;
  logic [9:0] ram_addr, end_addr = 0;
  logic [39:0] ram_rdata, wdata = 0;
  logic [19:0] vec, hist_host_rdata;
  logic [5:0]  hadd;
  logic [9:0]  cmd, waddr = 0;
  logic [4:0]  pf_count;
  logic        we = 0;

  int checks = 0, failures = 0, cyc = 0, first_cyc, last_cyc;
  logic [19:0] got [$];

  always #5 clk = ~clk;

  vector_ram u_ram (
    .clk, .we, .re(ram_req), .addr(we ? waddr : ram_addr), .wdata, .rdata(ram_rdata)
  );

  fg_decompressor dut (
    .clk, .rst, .start, .loop_en(1'b0), .loop_addr(10'd0), .end_addr,
    .ram_req, .ram_addr, .ram_busy(we), .ram_rdata,
    .vec_valid, .vec, .running,
    .hist_host_addr(6'd0), .hist_host_rdata, .hadd, .cmd, .pf_count, .stall
  );

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vec_valid) begin
      if (got.size() == 0) first_cyc = cyc;
      last_cyc = cyc;
      got.push_back(vec);
    end
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run_workload(input string name, ref logic [19:0] v[$], input int max_words);
    int unsigned bytes [$];
    logic [39:0] words [$];
    int lat, k;
    bit ok;
    ok = compress_block(v, 0, v.size(), bytes);
    chk(ok, {name, ": compressor could not pad"});
    pack_words(bytes, words);
    chk(words.size() <= max_words, $sformatf("%s: %0d words do not fit in %0d",
                                             name, words.size(), max_words));
    $display("%s: %0d vectors -> %0d words (%0d bits), ratio %0.2f:1", name, v.size(),
             words.size(), words.size() * 40, real'(v.size() * 20) / real'(words.size() * 40));
    // host-style load through the RAM's single port
    foreach (words[i]) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = words[i];
    end
    @(negedge clk) we = 0;
    end_addr = 10'(words.size() - 1);
    got.delete();
    @(negedge clk) start = 1;
    lat = 0;
    while (!vec_valid && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 4, $sformatf("%s: first vector after %0d clocks", name, lat));
    k = 0;
    while (running && k < 200000) begin @(posedge clk); #1; k++; end
    repeat (3) @(posedge clk);
    start = 0;
    chk(!running, {name, ": run did not end"});
    chk(got.size() == v.size(), $sformatf("%s: %0d of %0d vectors delivered",
                                          name, got.size(), v.size()));
    foreach (v[i]) begin
      if (i >= got.size() || got[i] !== v[i]) begin
        chk(0, $sformatf("%s: vector %0d wrong", name, i));
        break;
      end
    end
    checks++;
    chk(last_cyc - first_cyc + 1 == v.size(),
        $sformatf("%s: %0d vectors took %0d clocks", name, v.size(), last_cyc - first_cyc + 1));
    @(negedge clk);
  endtask

  // Test-program-like data: idx changes rarely, pin 0 is a clock, pins 4:1 a
  // counter stepping every 8 cycles, pins 12:5 a bus value held 16 cycles,
  // pins 15:13 static per 256 cycles; bursts of the last 16..48 vectors
  // recur now and then (a repeated bus transaction).
  function automatic void program_vectors(ref logic [19:0] v[$], input int n);
    logic [3:0] idx = 0;
    logic [7:0] bus = 0;
    logic [2:0] stat = 0;
    int i = 0;
    while (i < n) begin
      if (i >= 64 && $urandom_range(0, 99) < 7) begin
        int len = int'($urandom_range(16, 48));
        int from = i - int'($urandom_range(len, 60));
        for (int k = 0; k < len && i < n; k++, i++) v.push_back(v[from + k]);
      end else begin
        if (i % 16 == 0) bus = 8'($urandom);
        if (i % 256 == 0) begin stat = 3'($urandom); idx = 4'($urandom); end
        v.push_back({idx, stat, bus, 4'(i / 8), 1'(i)});
        i++;
      end
    end
  endfunction

  initial begin
    logic [19:0] v [$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2) @(posedge clk);

    begin
      // distinct random-looking vectors (odd multiplier: a permutation of
      // the 20-bit values), so no Copy can ever apply
      logic [19:0] mul = 20'($urandom) | 20'd1, add = 20'($urandom);
      for (int i = 0; i < 2032; i++) v.push_back(20'(i) * mul + add);
    end
    st_lit64 = 0;
    run_workload("random worst case", v, 1024);
    chk(st_lit64 == 31, $sformatf("%0d Literals of 64, expected 31", st_lit64));

    v.delete();
    program_vectors(v, 10000);
    run_workload("nominal 10K vectors", v, 1024);

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
