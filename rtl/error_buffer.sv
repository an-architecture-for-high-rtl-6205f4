// Error detection and recording.
//
// Each valid cycle the acquired DUT data is compared with the expected data;
// a mismatch on any channel whose mask bit is clear is an error. The first
// ENTRIES errors of a run are written to a small RAM as {cycle number,
// acquired data}; after each one the pointer advances, and once the buffer is
// full further errors are ignored. clear (asserted at Start) empties the
// buffer. The host reads entries through a separate port after the run.
// Compare-under-mask, 16 entries and "ignore when full" follow the
// architecture; the 24-bit cycle field (the rest of a 40-bit word) and
// recording the acquired data rather than the difference are this design's
// choice.
`timescale 1ns/1ps
module error_buffer #(
  parameter int ENTRIES = 16,
  parameter int N_CH    = 16,
  parameter int CYC_W   = 24,
  parameter int AW      = $clog2(ENTRIES)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 valid,
  input  logic [N_CH-1:0]      acq,
  input  logic [N_CH-1:0]      expect_d,
  input  logic [N_CH-1:0]      mask,
  input  logic [CYC_W-1:0]     cycle,
  output logic                 error,      // error in this cycle (combinational)
  output logic [AW:0]          count,      // entries recorded
  output logic                 full,
  input  logic [AW-1:0]        host_addr,
  output logic [CYC_W+N_CH-1:0] host_rdata
);
  logic [CYC_W+N_CH-1:0] mem [ENTRIES];

  assign error = valid && (((acq ^ expect_d) & ~mask) != '0);
  assign full  = (count == ENTRIES[AW:0]);

  always_ff @(posedge clk) begin
    if (error && !full) mem[count[AW-1:0]] <= {cycle, acq};
  end

  always_ff @(posedge clk) begin
    if (rst || clear)          count <= '0;
    else if (error && !full)   count <= count + 1'b1;
  end

  assign host_rdata = mem[host_addr];
endmodule
