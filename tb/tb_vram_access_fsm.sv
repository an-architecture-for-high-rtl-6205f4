// Self-checking test of the vector-RAM access sequencer: a host write holds
// VRamSel for three clocks with VRamEnWrite in the second, then waits for
// WriteVRam to drop; a host read holds VRamSel with VRamEnRead in the second
// clock and stays selected, with the data ready, until ReadVRam drops. The
// host leaves each request bit low for at least two clocks, as the slow host
// bus always does, because W3 is entered one clock after W2.
`timescale 1ns/1ps
module tb_vram_access_fsm;
  logic clk = 0, rst = 1, write_vram = 0, read_vram = 0;
  logic vram_sel, vram_en_write, vram_en_read, read_done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vram_access_fsm dut (.clk, .rst, .write_vram, .read_vram, .vram_sel, .vram_en_write, .vram_en_read, .read_done);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t: %b", s, $time, {vram_sel, vram_en_write, vram_en_read, read_done}); end
  endtask
  task automatic expect_o(input bit s, input bit w, input bit r, input bit d, input string what);
    @(posedge clk); #1;
    chk({vram_sel, vram_en_write, vram_en_read, read_done} === {s, w, r, d}, what);
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 chk({vram_sel, vram_en_write, vram_en_read, read_done} === 4'b0, "idle after reset");
    for (int n = 0; n < 200; n++) begin
      automatic int hold = $urandom_range(0, 6);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        write_vram = 1;
        expect_o(1, 0, 0, 0, "W0");
        expect_o(1, 1, 0, 0, "W1 write enable");
        expect_o(1, 0, 0, 0, "W2");
        for (int k = 0; k < hold; k++) expect_o(0, 0, 0, 0, "W3 waits");
        @(negedge clk) write_vram = 0;
        expect_o(0, 0, 0, 0, "back to Init");
        expect_o(0, 0, 0, 0, "idle");   // W3 may need this clock to see the bit low
      end else begin
        read_vram = 1;
        expect_o(1, 0, 0, 0, "R0");
        expect_o(1, 0, 1, 0, "R1 read enable");
        expect_o(1, 0, 0, 1, "R2 data ready");
        for (int k = 0; k < hold; k++) expect_o(1, 0, 0, 1, "R2 waits");
        @(negedge clk) read_vram = 0;
        expect_o(0, 0, 0, 0, "back to Init");
        expect_o(0, 0, 0, 0, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
