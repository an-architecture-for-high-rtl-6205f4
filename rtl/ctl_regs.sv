// Decompressor control registers and host access to the on-chip RAMs.
//
// Write side (absolute addresses): 0x180 Loop address, 0x181 End address,
// 0x182 ExtRAdd (RAM address for host accesses), 0x183 ExtRCtl (RAM access
// control), 0x184-0x187 RWD0-RWD3 (40-bit write data, RWD0 = bits 9:0),
// 0x188 DCtl (DRAM timing control; stored and not otherwise used here).
// Read side: 0x180 Debug {running, error buffer full, errors recorded[3:0],
// prefetch bytes[3:0]}, 0x181 VAdd (vector fetch address), 0x182 HAdd
// (history write pointer), 0x183 Cmd (last command), 0x184-0x187 RRD0-RRD3.
//
// A RAM access: write the address to ExtRAdd, the data to RWD0-3 for a write,
// then set and clear the ExtRCtl bit. ExtRCtl bit 0 (WriteVRam) and bit 1
// (ReadVRam) go to the vector-RAM access sequencer; the read data is taken
// into RRD while the sequencer is in R2. Bits 2-5 act on their rising edge:
// write the control map, read the control map, read the history buffer, read
// the error buffer; each read lands in RRD one clock later.
// Register addresses and names follow the architecture; the bit assignment of
// ExtRCtl and of Debug is this design's choice.
`timescale 1ns/1ps
module ctl_regs
  import tr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [9:0]        addr,
  input  logic              wr_en,
  input  logic [9:0]        wdata,
  output logic [9:0]        rdata,
  // to the decompressor
  output logic [9:0]        loop_addr,
  output logic [9:0]        end_addr,
  output logic [9:0]        dctl,
  // RAM access
  output logic [9:0]        ext_radd,
  output logic [WORD_W-1:0] ext_wdata,
  output logic              write_vram,
  output logic              read_vram,
  input  logic              vram_read_done,
  input  logic [WORD_W-1:0] vram_rdata,
  output logic              map_we,
  input  logic [WORD_W-1:0] map_rdata,
  input  logic [VEC_W-1:0]  hist_rdata,
  input  logic [WORD_W-1:0] err_rdata,
  // status
  input  logic              running,
  input  logic              err_full,
  input  logic [3:0]        err_count,
  input  logic [3:0]        pf_count,
  input  logic [9:0]        vadd,
  input  logic [5:0]        hadd,
  input  logic [9:0]        cmd
);
  logic [5:0]        ext_rctl, rctl_q;
  logic [WORD_W-1:0] rrd;
  logic [5:0]        rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      loop_addr <= '0; end_addr <= '0; ext_radd <= '0; ext_rctl <= '0;
      ext_wdata <= '0; dctl <= '0;
    end else if (wr_en) begin
      unique case (addr)
        A_LOOP:     loop_addr <= wdata;
        A_END:      end_addr  <= wdata;
        A_EXTRADD:  ext_radd  <= wdata;
        A_EXTRCTL:  ext_rctl  <= wdata[5:0];
        A_RWD0:     ext_wdata[9:0]   <= wdata;
        A_RWD0 + 1: ext_wdata[19:10] <= wdata;
        A_RWD0 + 2: ext_wdata[29:20] <= wdata;
        A_RWD0 + 3: ext_wdata[39:30] <= wdata;
        A_DCTL:     dctl      <= wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rctl_q <= '0;
    else     rctl_q <= ext_rctl;
  end
  assign rise = ext_rctl & ~rctl_q;

  assign write_vram = ext_rctl[XC_WRITE_VRAM];
  assign read_vram  = ext_rctl[XC_READ_VRAM];
  assign map_we     = rise[XC_WRITE_MAP];

  always_ff @(posedge clk) begin
    if (rst)                     rrd <= '0;
    else if (vram_read_done)     rrd <= vram_rdata;
    else if (rise[XC_READ_MAP])  rrd <= map_rdata;
    else if (rise[XC_READ_HIST]) rrd <= WORD_W'(hist_rdata);
    else if (rise[XC_READ_ERR])  rrd <= err_rdata;
  end

  always_comb begin
    unique case (addr)
      A_LOOP:     rdata = {running, err_full, err_count, pf_count};
      A_END:      rdata = vadd;
      A_EXTRADD:  rdata = {4'd0, hadd};
      A_EXTRCTL:  rdata = cmd;
      A_RWD0:     rdata = rrd[9:0];
      A_RWD0 + 1: rdata = rrd[19:10];
      A_RWD0 + 2: rdata = rrd[29:20];
      A_RWD0 + 3: rdata = rrd[39:30];
      default:    rdata = '0;
    endcase
  end
endmodule
