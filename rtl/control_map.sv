// Control map: 16 entries, each holding the inhibit and mask patterns of the
// 16 channels. Every vector carries a 4-bit index into the map instead of
// 32 control bits, so a vector is 20 bits instead of 48.
//
// Entries are 40-bit RAM words of which 32 are used: bits [31:16] inhibit,
// bits [15:0] mask, bits [39:32] stored but unused. The vector path reads
// with one clock of latency (idx in, inhibit/mask out on the next clock);
// the host writes a whole word and reads one back through its own port.
// Entry count and field widths follow the architecture; the bit order inside
// the word and the latency are this design's choice.
`timescale 1ns/1ps
module control_map #(
  parameter int ENTRIES = 16,
  parameter int N_CH    = 16,
  parameter int W       = 40,
  parameter int IW      = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rd_en,
  input  logic [IW-1:0]   idx,
  output logic [N_CH-1:0] inhibit,
  output logic [N_CH-1:0] mask,
  input  logic            host_we,
  input  logic [IW-1:0]   host_addr,
  input  logic [W-1:0]    host_wdata,
  output logic [W-1:0]    host_rdata
);
  logic [W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    if (rd_en) begin
      inhibit <= mem[idx][2*N_CH-1:N_CH];
      mask    <= mem[idx][N_CH-1:0];
    end
  end

  assign host_rdata = mem[host_addr];
endmodule
