// Single-chip 16-channel tester.
//
// A host loads compressed test vectors into the on-chip vector RAM, a
// 16-entry control map and per-channel timing/format registers over a slow
// 10-bit bus, then raises Start. From then on the chip runs on its own at one
// vector per CycleClock: the Fiala-Greene decompressor expands the stream
// into 20-bit vectors (4-bit map index + 16 force/expect bits), the control
// map turns the index into per-channel inhibit and mask bits, and each
// pin-electronics channel drives its pad with calibrated edges and samples
// the DUT response. Responses are compared with the expected bits under the
// mask and the first 16 failures are recorded with their cycle numbers for
// the host to read afterwards. With Loop asserted the block between the Loop
// and End addresses repeats; otherwise the chip stops at End and the last
// vector stays on the pads.
//
// Vector pipeline (CycleClock):
//   A  decompressor output register (vec, valid)
//   B  control-map read and force data register: pads driven during B
//   B+2 acquired data of cycle B leaves the channels
//   B+3 one more pipeline stage, compare, error buffer write
// The cycle number recorded is the vector's position in the run, from 0.
// After reset every pad is undriven until the first vector arrives.
//
// Host address map: 0x000-0x17F pin-electronics registers (channel*24 +
// register), 0x180-0x188 decompressor control registers (ctl_regs).
// Clocks: CycleClock (all digital logic), Clock (delay-line shift registers,
// 1/2/4/8 times CycleClock), CycleClock/2 (square wave at half rate, input of
// all delay lines), RefClock (calibration reference).
// The partitioning and every size follow the architecture; pipeline depth and
// bus synchronisation are this design's choices.
// Some sub-block outputs have no consumer here and are left unconnected on
// purpose: the decompressor stall flag, the channels' timing pulses (for
// probing), the per-cycle error flag, DCtl (the dynamic RAM timing it would
// set is not modelled) and the top bits of two 5-bit counts, of which the
// Debug register shows only 4.
`timescale 1ns/1ps
module testarossa_top
  import tr_pkg::*;
#(
  parameter int VRAM_WORDS = 1024
) (
  input  logic              cycle_clk,
  input  logic              sr_clk,
  input  logic              cyc2_clk,
  input  logic              ref_clk,
  input  logic              reset,
  input  logic              start,
  input  logic              loop,
  input  logic [9:0]        io_ad_i,
  output logic [9:0]        io_ad_o,
  output logic              io_ad_oe,
  input  logic              io_adr,
  input  logic              io_rd,
  input  logic              io_wr,
  input  logic              chip_sel,
  input  logic [N_CH-1:0]   dut_in,
  output logic [N_CH-1:0]   pad_cmos_pu,
  output logic [N_CH-1:0]   pad_cmos_pd,
  output logic [N_CH-1:0]   pad_ttl_pu,
  output logic [N_CH-1:0]   pad_ttl_pd
);
  localparam int PE_SPAN = N_CH * PE_REGS_PER_CH;   // 384 = 0x180
  localparam int LAT     = 3;                       // B -> compare

  logic clk, rst;
  assign clk = cycle_clk;
  assign rst = reset;

  // ------------------------------------------------------------ host bus
  logic [9:0] h_addr, h_wdata, h_rdata, ctl_rdata;
  logic       h_addr_valid, h_wr;
  logic [9:0] pe_rdata [N_CH];
  logic [3:0] pe_ch;
  logic [4:0] pe_off;
  logic       pe_hit;

  host_interface u_host (
    .clk, .rst, .io_ad_i, .io_adr, .io_rd, .io_wr, .chip_sel,
    .rdata(h_rdata), .io_ad_o, .io_ad_oe,
    .addr(h_addr), .addr_valid(h_addr_valid), .wr_en(h_wr), .wdata(h_wdata)
  );

  assign pe_hit = h_addr_valid && (int'(h_addr) < PE_SPAN);
  assign pe_ch  = 4'(int'(h_addr) / PE_REGS_PER_CH);
  assign pe_off = 5'(int'(h_addr) % PE_REGS_PER_CH);
  assign h_rdata = !h_addr_valid ? '0 : pe_hit ? pe_rdata[pe_ch] : ctl_rdata;

  // ------------------------------------------------- control registers
  logic [9:0]        loop_addr, end_addr, dctl, ext_radd, vadd, cmd;
  logic [WORD_W-1:0] ext_wdata, vram_rdata, map_rdata, err_rdata;
  logic              write_vram, read_vram, vram_read_done, map_we;
  logic [VEC_W-1:0]  hist_rdata;
  logic              running, err_full, stall;
  logic [4:0]        err_count, pf_count;
  logic [5:0]        hadd;

  ctl_regs u_ctl (
    .clk, .rst, .addr(h_addr), .wr_en(h_wr && h_addr_valid && !pe_hit), .wdata(h_wdata),
    .rdata(ctl_rdata), .loop_addr, .end_addr, .dctl, .ext_radd, .ext_wdata,
    .write_vram, .read_vram, .vram_read_done, .vram_rdata, .map_we, .map_rdata,
    .hist_rdata, .err_rdata, .running, .err_full, .err_count(err_count[3:0]),
    .pf_count(pf_count[3:0]), .vadd, .hadd, .cmd
  );

  // --------------------------------------------------------- vector RAM
  logic vram_sel, vram_en_write, vram_en_read;
  logic dec_req;
  logic [9:0] dec_addr;

  vram_access_fsm u_vfsm (
    .clk, .rst, .write_vram, .read_vram,
    .vram_sel, .vram_en_write, .vram_en_read, .read_done(vram_read_done)
  );

  vector_ram #(.WORDS(VRAM_WORDS), .W(WORD_W)) u_vram (
    .clk,
    .we   (vram_sel && vram_en_write),
    .re   (vram_sel ? vram_en_read : dec_req),
    .addr (vram_sel ? ext_radd[$clog2(VRAM_WORDS)-1:0] : dec_addr[$clog2(VRAM_WORDS)-1:0]),
    .wdata(ext_wdata),
    .rdata(vram_rdata)
  );

  // ------------------------------------------------------- decompressor
  logic             vec_valid;
  logic [VEC_W-1:0] vec;

  fg_decompressor u_dec (
    .clk, .rst, .start, .loop_en(loop), .loop_addr, .end_addr,
    .ram_req(dec_req), .ram_addr(dec_addr), .ram_busy(vram_sel), .ram_rdata(vram_rdata),
    .vec_valid, .vec, .running,
    .hist_host_addr(ext_radd[5:0]), .hist_host_rdata(hist_rdata),
    .hadd, .cmd, .pf_count, .stall
  );
  assign vadd = dec_addr;

  // ------------------------------------------------- control map, stage B
  logic [N_CH-1:0] map_inhibit, map_mask, force_b, inhibit_b;
  logic            valid_b, drive_ok, start_q, start_edge;
  logic [CYC_W-1:0] cyc_a, cyc_b;

  control_map #(.ENTRIES(MAP_ENTRIES), .N_CH(N_CH), .W(WORD_W)) u_map (
    .clk, .rd_en(vec_valid), .idx(vec[VEC_W-1 -: IDX_W]),
    .inhibit(map_inhibit), .mask(map_mask),
    .host_we(map_we), .host_addr(ext_radd[3:0]), .host_wdata(ext_wdata), .host_rdata(map_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) start_q <= 1'b1;
    else     start_q <= start;
  end
  assign start_edge = start && !start_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_b  <= 1'b0;
      drive_ok <= 1'b0;
      cyc_a    <= '0;
    end else begin
      valid_b <= vec_valid;
      if (vec_valid) drive_ok <= 1'b1;
      if (start_edge)     cyc_a <= '0;
      else if (vec_valid) cyc_a <= cyc_a + 1'b1;
    end
    if (vec_valid) begin
      force_b <= vec[N_CH-1:0];
      cyc_b   <= cyc_a;
    end
  end
  assign inhibit_b = drive_ok ? map_inhibit : '1;

  // ------------------------------------------------------------ channels
  logic [N_CH-1:0] acq, pulse;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    pe_channel u_ch (
      .clk, .rst, .sr_clk, .cyc2_clk, .ref_clk,
      .sel(pe_hit && pe_ch == 4'(c)), .offset(pe_off), .wr_en(h_wr), .wdata(h_wdata[7:0]),
      .rdata(pe_rdata[c]),
      .force_d(force_b[c]), .inhibit(inhibit_b[c]), .acq(acq[c]),
      .dut_in(dut_in[c]),
      .cmos_pu(pad_cmos_pu[c]), .cmos_pd(pad_cmos_pd[c]),
      .ttl_pu(pad_ttl_pu[c]), .ttl_pd(pad_ttl_pd[c]), .pulse(pulse[c])
    );
  end

  // ------------------------------------------------ compare and record
  logic [N_CH-1:0]  exp_p [LAT];
  logic [N_CH-1:0]  msk_p [LAT];
  logic [CYC_W-1:0] cyc_p [LAT];
  logic [LAT-1:0]   val_p;
  logic [N_CH-1:0]  acq_p;
  logic             cycle_error;

  always_ff @(posedge clk) begin
    exp_p[0] <= force_b;
    msk_p[0] <= map_mask;
    cyc_p[0] <= cyc_b;
    for (int i = 1; i < LAT; i++) begin
      exp_p[i] <= exp_p[i-1];
      msk_p[i] <= msk_p[i-1];
      cyc_p[i] <= cyc_p[i-1];
    end
    acq_p <= acq;
    if (rst || start_edge) val_p <= '0;
    else                   val_p <= {val_p[LAT-2:0], valid_b};
  end

  error_buffer #(.ENTRIES(ERR_ENTRIES), .N_CH(N_CH), .CYC_W(CYC_W)) u_err (
    .clk, .rst, .clear(start_edge), .valid(val_p[LAT-1]),
    .acq(acq_p), .expect_d(exp_p[LAT-1]), .mask(msk_p[LAT-1]), .cycle(cyc_p[LAT-1]),
    .error(cycle_error), .count(err_count), .full(err_full),
    .host_addr(ext_radd[3:0]), .host_rdata(err_rdata)
  );
endmodule
