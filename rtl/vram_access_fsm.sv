// Host access sequencer of the vector RAM.
//
// The host requests an access by setting the WriteVRam or ReadVRam bit of
// ExtRCtl and ends it by clearing the bit. From Init a write goes through
// W0, W1, W2 to W3 and a read through R0, R1 to R2; W3 and R2 wait there until
// the request bit is cleared, then return to Init. VRamSel, which hands the
// RAM address and data ports to the host, is asserted in W0-W2 and R0-R2;
// VRamEnWrite is asserted in W1 and VRamEnRead in R1, so the RAM is driven
// with stable address and data for a clock before and after the strobe.
// Outputs are decoded from the state register (Moore form).
// States, outputs and transitions follow the state diagram of the design;
// the priority of a write when both bits are set, and the synchronous reset
// to Init, are this design's choices. The read data is valid from R2 on.
`timescale 1ns/1ps
module vram_access_fsm (
  input  logic clk,
  input  logic rst,
  input  logic write_vram,
  input  logic read_vram,
  output logic vram_sel,
  output logic vram_en_write,
  output logic vram_en_read,
  output logic read_done       // in R2: read data is on the RAM output
);
  typedef enum logic [2:0] {INIT, W0, W1, W2, W3, R0, R1, R2} state_e;
  state_e state, nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      INIT: if (write_vram)     nxt = W0;
            else if (read_vram) nxt = R0;
      W0:   nxt = W1;
      W1:   nxt = W2;
      W2:   nxt = W3;
      W3:   if (!write_vram)    nxt = INIT;
      R0:   nxt = R1;
      R1:   nxt = R2;
      R2:   if (!read_vram)     nxt = INIT;
      default: nxt = INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= INIT;
    else     state <= nxt;
  end

  assign vram_sel      = (state inside {W0, W1, W2, R0, R1, R2});
  assign vram_en_write = (state == W1);
  assign vram_en_read  = (state == R1);
  assign read_done     = (state == R2);
endmodule
