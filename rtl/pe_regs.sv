// Pin-electronics registers of one channel.
//
// Each channel has three delay generators (Sample = 0, Width = 1, Delay = 2),
// each with seven 8-bit registers: DSR0, DSR1 (shift-register tap),
// IC0-IC2 (inverter-chain tap) and ECR, ECF (rising and falling edge adjust),
// plus an IOCtl and a Format register. Within the channel's 24-address window
// a generator register sits at generator*8 + offset (offsets 0-6), IOCtl at
// offset 7 and Format at 15; the window starts at channel*24. All fields are
// one-hot with bit 0 the shortest delay. Registers are 8 bits, right-aligned
// on the 10-bit bus. Reading IOCtl also returns the phase detector's results
// in bits 9:8 ({falling-edge, rising-edge} sample).
//
// The register set, the address arithmetic and the one-hot coding follow the
// architecture; the IOCtl bit meanings, the Format encoding (tr_pkg) and
// clearing every register on reset are this design's choices.
`timescale 1ns/1ps
module pe_regs
  import tr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,         // address lies in this channel's window
  input  logic [4:0] offset,      // address - channel*24
  input  logic       wr_en,
  input  logic [7:0] wdata,
  output logic [9:0] rdata,
  input  logic [1:0] pd_result,   // phase detector {fall, rise}
  output dgen_cfg_t  cfg_sample,
  output dgen_cfg_t  cfg_width,
  output dgen_cfg_t  cfg_delay,
  output logic [7:0] ioctl,
  output fmt_e       fmt
);
  logic [7:0] gen [3][7];
  logic [7:0] fmt_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int g = 0; g < 3; g++)
        for (int r = 0; r < 7; r++) gen[g][r] <= 8'd0;
      ioctl <= 8'd0;
      fmt_r <= 8'd0;
    end else if (sel && wr_en) begin
      if (offset == 5'(R_IOCTL))       ioctl <= wdata;
      else if (offset == 5'(R_FORMAT)) fmt_r <= wdata;
      else if (offset[2:0] != 3'd7 && offset[4:3] != 2'd3)
        gen[offset[4:3]][offset[2:0]] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (offset == 5'(R_IOCTL))       rdata = {pd_result, ioctl};
    else if (offset == 5'(R_FORMAT)) rdata = {2'b00, fmt_r};
    else if (offset[2:0] != 3'd7 && offset[4:3] != 2'd3)
      rdata = {2'b00, gen[offset[4:3]][offset[2:0]]};
  end

  function automatic dgen_cfg_t unpack(input logic [1:0] g);
    dgen_cfg_t c;
    c.dsr = {gen[g][R_DSR1], gen[g][R_DSR0]};
    c.ic  = {gen[g][R_IC2], gen[g][R_IC1], gen[g][R_IC0]};
    c.ecr = gen[g][R_ECR];
    c.ecf = gen[g][R_ECF];
    return c;
  endfunction

  assign cfg_sample = unpack(2'(GEN_SAMPLE));
  assign cfg_width  = unpack(2'(GEN_WIDTH));
  assign cfg_delay  = unpack(2'(GEN_DELAY));
  assign fmt = (fmt_r[2:0] <= 3'd4) ? fmt_e'(fmt_r[2:0]) : FMT_NRZ;
endmodule
