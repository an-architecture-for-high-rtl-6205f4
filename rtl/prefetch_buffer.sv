// Prefetch buffer between the vector RAM and the command decoder.
//
// A fetched 40-bit RAM word enters as four 10-bit bytes, byte 0 (bits 9:0)
// first. The decoder sees the next three bytes at once (a Literal command
// plus one 20-bit vector is the most it consumes in a clock) and removes
// 0 to 3 of them per clock. Each byte carries a "target" tag, set on byte 0
// of the word at the branch target address, so the decoder knows where the
// target block starts. flush empties the buffer. Push and pop may happen in
// the same clock; the fetch logic outside keeps count at or below CAP.
// The byte-wide queue is this design's choice: the architecture asks only
// that enough of the stream is always buffered to produce one vector per
// clock. Three words are held rather than two because the RAM read takes a
// clock.
`timescale 1ns/1ps
module prefetch_buffer
  import tr_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int CAP   = 12,
  parameter int PW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              flush,
  input  logic              push,
  input  logic [WORD_W-1:0] push_word,
  input  logic              push_tgt,
  input  logic [1:0]        pop,
  output logic [BYTE_W-1:0] head   [3],
  output logic              head_tgt,
  output logic [PW:0]       count
);
  logic [BYTE_W-1:0] data [DEPTH];
  logic              tgt  [DEPTH];
  logic [PW-1:0]     rp, wp;

  always_ff @(posedge clk) begin
    if (push) begin
      for (int i = 0; i < BYTES_PER_WORD; i++) begin
        data[wp + PW'(i)] <= push_word[i*BYTE_W +: BYTE_W];
        tgt [wp + PW'(i)] <= (i == 0) && push_tgt;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      rp    <= rp + PW'(pop);
      if (push) wp <= wp + PW'(BYTES_PER_WORD);
      count <= count + (push ? (PW+1)'(BYTES_PER_WORD) : '0) - (PW+1)'(pop);
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_head
    assign head[k] = data[rp + PW'(k)];
  end
  assign head_tgt = tgt[rp];

  // The decoder never takes more than it has been shown to hold.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst || flush) (PW+1)'(pop) <= count);
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst || flush) count <= (PW+1)'(CAP));
endmodule
