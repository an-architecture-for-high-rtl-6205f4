// Self-checking test of the prefetch buffer against a byte-queue model:
// random pushes of 40-bit words (byte 0 = bits 9:0) and pops of 0..3 bytes;
// head[0..2], the target tag of head[0] and the byte count must match the
// model every clock; flush empties the buffer.
`timescale 1ns/1ps
module tb_prefetch_buffer;
  logic clk = 0, rst = 1, flush = 0, push = 0, push_tgt = 0;
  logic [39:0] push_word = 0;
  logic [1:0]  pop = 0;
  logic [9:0]  head [3];
  logic        head_tgt;
  logic [4:0]  count;
  logic [10:0] q [$];            // {tgt, byte}
  int checks = 0, failures = 0, tags = 0, fulls = 0;
  always #5 clk = ~clk;
  prefetch_buffer dut (.clk, .rst, .flush, .push, .push_word, .push_tgt, .pop, .head, .head_tgt, .count);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      int avail;
      #1;
      chk(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      for (int k = 0; k < 3; k++)
        if (k < q.size()) chk(head[k] === q[k][9:0], $sformatf("head[%0d]", k));
      if (q.size() > 0) begin
        chk(head_tgt === q[0][10], "target tag");
        if (q[0][10]) tags++;
      end
      flush = ($urandom_range(0, 300) == 0);
      avail = q.size() > 3 ? 3 : q.size();
      pop = 2'($urandom_range(0, avail));
      push = (q.size() - pop + 4 <= 12) && $urandom_range(0, 2) != 0;
      if (q.size() - pop + 4 > 12) fulls++;
      push_word = {8'($urandom), 32'($urandom)};
      push_tgt = $urandom_range(0, 3) == 0;
      @(posedge clk);
      if (flush) q.delete();
      else begin
        for (int k = 0; k < pop; k++) void'(q.pop_front());
        if (push) for (int k = 0; k < 4; k++) q.push_back({push_tgt && k == 0, push_word[10*k +: 10]});
      end
      @(negedge clk);
    end
    chk(tags > 0 && fulls > 0, "tagged bytes and a full buffer exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
