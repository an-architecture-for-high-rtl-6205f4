// Shared constants and types of the single-chip tester.
//
// Sizes that the architecture fixes (16 channels, 20-bit vectors made of a
// 4-bit control-map index and 16 force/expect bits, 10-bit compressed
// "bytes", 40-bit RAM words, the 64-entry history buffer, the register
// addresses of the host bus) live here so that every module agrees on them.
// The encodings of the format register and of the ExtRCtl/IOCtl bits are
// this design's own choices; the rest follows the architecture description.
`timescale 1ns/1ps
package tr_pkg;

  localparam int N_CH       = 16;   // DUT channels per chip
  localparam int VEC_W      = 20;   // decompressed vector width
  localparam int IDX_W      = 4;    // control-map index width
  localparam int BYTE_W     = 10;   // compressed stream "byte"
  localparam int WORD_W     = 40;   // width of every on-chip RAM
  localparam int BYTES_PER_WORD = WORD_W / BYTE_W;
  localparam int VADDR_W    = 10;   // 1K-word vector RAM
  localparam int HIST_DEPTH = 64;
  localparam int HADDR_W    = 6;
  localparam int MAP_ENTRIES = 16;
  localparam int ERR_ENTRIES = 16;
  localparam int CYC_W      = 24;   // cycle number stored with an error

  // Host register addresses (10-bit bus)
  localparam logic [9:0] A_LOOP    = 10'h180; // W: loop (branch target) address / R: debug
  localparam logic [9:0] A_END     = 10'h181; // W: end address / R: VAdd
  localparam logic [9:0] A_EXTRADD = 10'h182; // W: RAM address / R: HAdd
  localparam logic [9:0] A_EXTRCTL = 10'h183; // W: RAM control / R: Cmd
  localparam logic [9:0] A_RWD0    = 10'h184; // W: write data 0..3 / R: read data 0..3
  localparam logic [9:0] A_DCTL    = 10'h188; // W: DRAM timing control
  localparam int PE_REGS_PER_CH = 24;        // address stride of a channel

  // Delay generator numbering used in the address calculation
  localparam int GEN_SAMPLE = 0;
  localparam int GEN_WIDTH  = 1;
  localparam int GEN_DELAY  = 2;

  // Register offsets inside a delay generator
  localparam int R_DSR0 = 0, R_DSR1 = 1, R_IC0 = 2, R_IC1 = 3, R_IC2 = 4, R_ECR = 5, R_ECF = 6;
  localparam int R_IOCTL  = 7;   // per channel
  localparam int R_FORMAT = 15;  // per channel

  // ExtRCtl bits (level sensitive: set, then clear)
  localparam int XC_WRITE_VRAM = 0;
  localparam int XC_READ_VRAM  = 1;
  localparam int XC_WRITE_MAP  = 2;
  localparam int XC_READ_MAP   = 3;
  localparam int XC_READ_HIST  = 4;
  localparam int XC_READ_ERR   = 5;

  // IOCtl bits
  localparam int IO_TTL_OUT  = 0;  // drive at TTL levels
  localparam int IO_TTL_IN   = 1;  // compare against the variable threshold
  localparam int IO_MIDPIPE  = 2;  // use the mid-cycle acquire pipeline stage
  localparam int IO_RC_MID   = 3;  // RC initial edge at mid-cycle

  typedef enum logic [2:0] {
    FMT_NRZ = 3'd0,
    FMT_RZ  = 3'd1,
    FMT_RO  = 3'd2,
    FMT_RT  = 3'd3,
    FMT_RC  = 3'd4
  } fmt_e;

  // Settings of one delay generator, one-hot fields (bit 0 = least delay)
  typedef struct packed {
    logic [7:0] ecf;
    logic [7:0] ecr;
    logic [23:0] ic;    // IC2:IC1:IC0
    logic [15:0] dsr;   // DSR1:DSR0
  } dgen_cfg_t;

  // Per-vector channel controls after the control map
  typedef struct packed {
    logic [N_CH-1:0] force_d;   // force / expect data
    logic [N_CH-1:0] inhibit;   // 1: do not drive (pin is a DUT output)
    logic [N_CH-1:0] mask;      // 1: ignore the comparison
  } vec_ctl_t;

  // Literal or Copy: the top four bits of a 10-bit command byte
  function automatic logic is_literal(input logic [3:0] op);
    return op == 4'd0;
  endfunction

endpackage
