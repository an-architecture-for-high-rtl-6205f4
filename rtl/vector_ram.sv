// Compressed vector storage: 1024 words of 40 bits, each word holding four
// 10-bit bytes of the compressed stream.
//
// On the chip this is a custom one-transistor dynamic RAM; here it is a plain
// synchronous single-port array with the same organisation. One access per
// clock: a write stores wdata at addr, a read returns mem[addr] on rdata one
// clock later (rdata holds its value otherwise). Refresh and self-timing of
// the dynamic cells are not modelled. The size follows the architecture;
// the one-cycle read latency is this design's choice.
`timescale 1ns/1ps
module vector_ram #(
  parameter int WORDS  = 1024,
  parameter int W      = 40,
  parameter int ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      wdata,
  output logic [W-1:0]      rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
