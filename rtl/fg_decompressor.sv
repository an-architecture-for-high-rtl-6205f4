// Fiala-Greene decompressor with fetch, branch and run control.
//
// The compressed stream is a sequence of 10-bit commands. A command whose top
// four bits are zero is a Literal: its low six bits give the number of
// 20-bit vectors that follow in the stream (0 means 64), each as two bytes,
// first byte = vector bits 19:10. Any other command is a Copy: bits 9:6 give
// a length of 1..15 and bits 5:0 an absolute history-buffer position; the
// vectors at position, position+1, ... (wrapping at 64) are delivered again.
// Every delivered vector is also written into the history buffer.
//
// One vector leaves per clock: a new Literal consumes 3 bytes (command and
// first vector), a Literal continuation 2, a new Copy 1, a Copy continuation
// none. The fetch logic reads one 40-bit RAM word (4 bytes) per clock
// whenever the prefetch buffer has room for it, so after the first two
// clocks of a run the output never stalls.
//
// Run control: a rising edge of start begins execution at RAM word 0. When
// the End word is fetched the Loop pin decides: asserted, fetching continues
// at the Loop (target) word; deasserted, fetching stops and the decoder goes
// idle once the last byte is used. The compressor aligns codewords on word
// boundaries at the target and after the End word, and issues no Copy that
// reaches back across the start of a block. The history write pointer is
// cleared at the start of a run and at the first command of the target word,
// so Copy positions inside the loop body mean the same on every pass.
//
// Timing: vec/vec_valid are registered; the first vector appears 4 clocks
// after the clock in which start rises (edge detect, RAM read, buffer push,
// decode). Command format, one-vector-per-clock, 64-entry history, and
// End/Loop behaviour follow the architecture; byte order, stream alignment
// rules at the start of a run, pointer clearing and loop sampling at fetch
// time are this design's choices.
`timescale 1ns/1ps
module fg_decompressor
  import tr_pkg::*;
#(
  parameter int HB_DEPTH   = 64,
  parameter int ADDR_W     = 10,
  parameter int PF_BYTES   = 12,
  parameter int HAW        = $clog2(HB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              loop_en,
  input  logic [ADDR_W-1:0] loop_addr,
  input  logic [ADDR_W-1:0] end_addr,
  // vector RAM read port
  output logic              ram_req,
  output logic [ADDR_W-1:0] ram_addr,
  input  logic              ram_busy,
  input  logic [WORD_W-1:0] ram_rdata,
  // decompressed output
  output logic              vec_valid,
  output logic [VEC_W-1:0]  vec,
  output logic              running,
  // observation for the host
  input  logic [HAW-1:0]    hist_host_addr,
  output logic [VEC_W-1:0]  hist_host_rdata,
  output logic [HAW-1:0]    hadd,
  output logic [BYTE_W-1:0] cmd,
  output logic [4:0]        pf_count,
  output logic              stall      // decoder waited for bytes this clock
);
  localparam int PFD = 16;
  localparam int PFW = $clog2(PFD);

  logic start_q, start_edge;
  logic fetching, rvalid_q, rtgt_q;
  logic [ADDR_W-1:0] fetch_addr;
  logic [6:0]  lit_rem;          // literal vectors still to come (0..63)
  logic [3:0]  cpy_rem;          // copy vectors still to come
  logic [HAW-1:0] cpy_ptr;
  logic        first_cmd;        // next command is the first of the run

  logic [BYTE_W-1:0] head [3];
  logic              head_tgt;
  logic [PFW:0]      count;
  logic [1:0]        pop;

  logic              out_en;
  logic [VEC_W-1:0]  out_vec;
  logic [HAW-1:0]    hist_raddr;
  logic [VEC_W-1:0]  hist_rdata;
  logic              ptr_clr;
  logic              new_cmd;
  logic              issue;

  assign start_edge = start && !start_q;

  always_ff @(posedge clk) begin
    if (rst) start_q <= 1'b1;    // a start held high through reset is not an edge
    else     start_q <= start;
  end

  // ---------------------------------------------------------------- fetch
  // Room check counts the bytes already on their way from the RAM.
  assign issue = fetching && !ram_busy && !start_edge &&
                 (int'(count) - int'(pop) + (rvalid_q ? BYTES_PER_WORD : 0)
                  + BYTES_PER_WORD <= PF_BYTES);
  assign ram_req  = issue;
  assign ram_addr = fetch_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      fetching   <= 1'b0;
      fetch_addr <= '0;
      rvalid_q   <= 1'b0;
      rtgt_q     <= 1'b0;
    end else if (start_edge) begin
      fetching   <= 1'b1;
      fetch_addr <= '0;
      rvalid_q   <= 1'b0;
      rtgt_q     <= 1'b0;
    end else begin
      rvalid_q <= issue;
      rtgt_q   <= issue && (fetch_addr == loop_addr);
      if (issue) begin
        if (fetch_addr == end_addr) begin
          if (loop_en) fetch_addr <= loop_addr;
          else         fetching   <= 1'b0;
        end else begin
          fetch_addr <= fetch_addr + 1'b1;
        end
      end
    end
  end

  prefetch_buffer #(.DEPTH(PFD), .CAP(PF_BYTES)) u_pf (
    .clk, .rst, .flush(start_edge),
    .push(rvalid_q && !start_edge), .push_word(ram_rdata), .push_tgt(rtgt_q),
    .pop, .head, .head_tgt, .count
  );

  // --------------------------------------------------------------- decode
  always_comb begin
    pop        = 2'd0;
    out_en     = 1'b0;
    out_vec    = {head[0], head[1]};
    hist_raddr = cpy_ptr;
    new_cmd    = 1'b0;
    if (running && !start_edge) begin
      if (lit_rem != 0) begin
        if (count >= 2) begin
          pop = 2'd2; out_en = 1'b1;
          out_vec = {head[0], head[1]};
        end
      end else if (cpy_rem != 0) begin
        out_en = 1'b1;
        out_vec = hist_rdata;
      end else if (count >= 1) begin
        if (is_literal(head[0][9:6])) begin
          if (count >= 3) begin
            pop = 2'd3; out_en = 1'b1; new_cmd = 1'b1;
            out_vec = {head[1], head[2]};
          end
        end else begin
          pop = 2'd1; out_en = 1'b1; new_cmd = 1'b1;
          hist_raddr = head[0][HAW-1:0];
          out_vec = hist_rdata;
        end
      end
    end
  end

  assign ptr_clr = new_cmd && (first_cmd || head_tgt);

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      lit_rem   <= '0;
      cpy_rem   <= '0;
      cpy_ptr   <= '0;
      first_cmd <= 1'b0;
      cmd       <= '0;
    end else if (start_edge) begin
      running   <= 1'b1;
      lit_rem   <= '0;
      cpy_rem   <= '0;
      first_cmd <= 1'b1;
    end else begin
      if (new_cmd) begin
        first_cmd <= 1'b0;
        cmd       <= head[0];
        if (is_literal(head[0][9:6])) begin
          lit_rem <= (head[0][5:0] == 6'd0) ? 7'd63 : 7'(head[0][5:0]) - 7'd1;
        end else begin
          cpy_rem <= head[0][9:6] - 4'd1;
          cpy_ptr <= head[0][HAW-1:0] + 1'b1;
        end
      end else if (out_en && lit_rem != 0) begin
        lit_rem <= lit_rem - 1'b1;
      end else if (out_en && cpy_rem != 0) begin
        cpy_rem <= cpy_rem - 1'b1;
        cpy_ptr <= cpy_ptr + 1'b1;
      end
      // Stream exhausted: nothing left to fetch, buffer and commands empty.
      if (running && !fetching && !rvalid_q && count == 0 && !out_en &&
          lit_rem == 0 && cpy_rem == 0)
        running <= 1'b0;
    end
  end

  history_buffer #(.DEPTH(HB_DEPTH), .W(VEC_W)) u_hist (
    .clk, .rst, .ptr_clr, .we(out_en), .wdata(out_vec),
    .raddr(hist_raddr), .rdata(hist_rdata),
    .host_raddr(hist_host_addr), .host_rdata(hist_host_rdata), .wptr(hadd)
  );

  always_ff @(posedge clk) begin
    if (rst) vec_valid <= 1'b0;
    else     vec_valid <= out_en;
    if (out_en) vec <= out_vec;
  end

  assign stall    = running && !start_edge && !out_en;
  assign pf_count = 5'(count);
endmodule
