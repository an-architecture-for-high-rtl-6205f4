// Host bus interface: 10-bit multiplexed address/data bus.
//
// The host places a register address on IOAdrData and pulses IOAdr; the
// address present at the trailing edge of IOAdr stays selected. IOWrite then
// writes the bus value into the selected register for as long as it is held
// (flow-through write), and IORead turns on the output drivers with the
// selected register's contents. ChipSelect gates reads and writes.
// Reset deselects every register.
//
// The bus is asynchronous to the chip. Here all bus inputs pass through a
// two-flop synchroniser on CycleClock, so the host must hold each phase for a
// few clocks (the bus is specified for pulses of 100 ns and more, far longer
// than a tester cycle). Outputs: the selected address, a write strobe that is
// high on every clock of a write, and the output enable of the data pins.
// The output enable is the one path that is not synchronised: it is decoded
// from the pins, and the selected register's contents (stable, as the
// address was latched earlier) are driven at once, so read data is valid
// well within the specified 100 ns of IORead.
// Pins and their meaning follow the architecture; the synchroniser is this
// design's choice.
`timescale 1ns/1ps
module host_interface (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] io_ad_i,
  input  logic       io_adr,
  input  logic       io_rd,
  input  logic       io_wr,
  input  logic       chip_sel,
  input  logic [9:0] rdata,       // contents of the selected register
  output logic [9:0] io_ad_o,
  output logic       io_ad_oe,
  output logic [9:0] addr,
  output logic       addr_valid,
  output logic       wr_en,
  output logic [9:0] wdata
);
  logic [9:0] ad_m, ad_s;
  logic [3:0] ctl_m, ctl_s;    // {cs, wr, rd, adr}

  always_ff @(posedge clk) begin
    ad_m  <= io_ad_i;  ad_s  <= ad_m;
    ctl_m <= {chip_sel, io_wr, io_rd, io_adr};
    ctl_s <= ctl_m;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_valid <= 1'b0;
      addr       <= '0;
    end else if (ctl_s[0]) begin          // follow the bus while IOAdr is high
      addr       <= ad_s;
      addr_valid <= 1'b1;
    end
  end

  assign wdata    = ad_s;
  assign wr_en    = ctl_s[3] && ctl_s[2] && !ctl_s[0] && addr_valid && !rst;
  // The output drivers follow the pins directly, so read data is on the bus as
  // soon as the pads turn on, whatever the CycleClock rate.
  assign io_ad_oe = chip_sel && io_rd && !io_adr && addr_valid;
  assign io_ad_o  = rdata;
endmodule
