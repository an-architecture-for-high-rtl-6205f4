// History buffer of the Fiala-Greene decompressor: the 64 most recently
// delivered 20-bit vectors.
//
// Every delivered vector is written at the write pointer, which then
// advances, so the oldest entry is always the one overwritten. Copy commands
// read an absolute position through the asynchronous read port; a read of
// the entry being written in the same clock returns the old contents. The
// pointer is cleared by ptr_clr (start of a run, first command of the branch
// target block) so that Copy positions mean the same thing on every pass of
// a loop. A second read port lets the host inspect the buffer.
// Depth and width follow the architecture (it lays the 64x20 buffer out as a
// 32x40 array; here it is kept logical); pointer clearing is this design's
// choice.
`timescale 1ns/1ps
module history_buffer #(
  parameter int DEPTH = 64,
  parameter int W     = 20,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ptr_clr,   // write this vector at entry 0
  input  logic          we,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic [AW-1:0] host_raddr,
  output logic [W-1:0]  host_rdata,
  output logic [AW-1:0] wptr       // next entry to be written
);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] waddr;

  assign waddr = ptr_clr ? '0 : wptr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)      wptr <= '0;
    else if (we)  wptr <= waddr + 1'b1;
    else if (ptr_clr) wptr <= '0;
  end

  assign rdata      = mem[raddr];
  assign host_rdata = mem[host_raddr];
endmodule
