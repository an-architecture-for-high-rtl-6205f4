// Test support: a reference Fiala-Greene compressor for the tester's stream
// format, used to build vector-RAM images whose decompressed output is known.
//
// Format produced (see fg_decompressor): 10-bit commands; Literal = 0000 and
// a 6-bit count (0 = 64) followed by two bytes per vector (bits 19:10 first);
// Copy = 4-bit length 1..15 and 6-bit absolute history position. A block
// starts with an empty history whose write pointer is 0, and its byte count
// is padded to a multiple of four (one RAM word) by splitting commands, so
// that every block starts on a word boundary. The compressor is greedy: at
// each vector it takes the longest Copy available (simulating the history
// exactly, including overlap with the write pointer), else extends a Literal.
`timescale 1ns/1ps
package tb_fg_pkg;

  typedef struct {
    bit        lit;     // 1: Literal, 0: Copy
    int        pos;     // Copy position
    int        len;     // vectors
    int        first;   // index of the first vector (Literal data source)
  } cmd_t;

  // statistics of the last compress_block call
  int st_lits, st_copies, st_lit64, st_wraps, st_splits;

  // Compress vectors v[lo..hi-1] as one block; append bytes to out.
  // Returns 0 when the block cannot be padded to a word multiple.
  function automatic bit compress_block(ref logic [19:0] v[$], input int lo, input int hi,
                                        ref int unsigned out[$]);
    logic [19:0] hist [64];
    bit          hv   [64];
    int          w = 0;
    cmd_t        cmds[$];
    int          i = lo;
    int          nbytes = 0;
    for (int k = 0; k < 64; k++) hv[k] = 0;
    while (i < hi) begin
      int best_len = 0, best_pos = 0;
      for (int p = 0; p < 64; p++) begin
        // simulate a copy from p
        logic [19:0] h2 [64];
        bit          v2 [64];
        int          ww = w, l = 0;
        for (int k = 0; k < 64; k++) begin h2[k] = hist[k]; v2[k] = hv[k]; end
        while (l < 15 && i + l < hi) begin
          int rp = (p + l) % 64;
          if (!v2[rp] || h2[rp] !== v[i+l]) break;
          h2[ww] = h2[rp]; v2[ww] = 1; ww = (ww + 1) % 64;
          l++;
        end
        if (l > best_len) begin best_len = l; best_pos = p; end
      end
      if (best_len > 0) begin
        cmd_t c; c.lit = 0; c.pos = best_pos; c.len = best_len; c.first = i;
        cmds.push_back(c);
        for (int l = 0; l < best_len; l++) begin
          hist[w] = v[i+l]; hv[w] = 1; w = (w + 1) % 64;
        end
        i += best_len;
      end else begin
        if (cmds.size() > 0 && cmds[$].lit && cmds[$].len < 64 &&
            cmds[$].first + cmds[$].len == i)
          cmds[$].len++;
        else begin
          cmd_t c; c.lit = 1; c.pos = 0; c.len = 1; c.first = i;
          cmds.push_back(c);
        end
        hist[w] = v[i]; hv[w] = 1; w = (w + 1) % 64;
        i++;
      end
    end
    foreach (cmds[k]) nbytes += cmds[k].lit ? 1 + 2 * cmds[k].len : 1;
    // pad to a word multiple by splitting commands
    while (nbytes % 4 != 0) begin
      int k;
      bit done = 0;
      for (k = 0; k < cmds.size(); k++) begin
        if (cmds[k].len >= 2) begin
          cmd_t a = cmds[k], b = cmds[k];
          a.len = 1;
          b.len = cmds[k].len - 1;
          b.pos = (cmds[k].pos + 1) % 64;
          b.first = cmds[k].first + 1;
          cmds.delete(k);
          cmds.insert(k, b);
          cmds.insert(k, a);
          nbytes++;
          st_splits++;
          done = 1;
          break;
        end
      end
      if (!done) return 0;
    end
    foreach (cmds[k]) begin
      if (cmds[k].lit) begin
        out.push_back(cmds[k].len == 64 ? 0 : cmds[k].len);
        for (int l = 0; l < cmds[k].len; l++) begin
          out.push_back(int'(v[cmds[k].first + l][19:10]));
          out.push_back(int'(v[cmds[k].first + l][9:0]));
        end
        st_lits++;
        if (cmds[k].len == 64) st_lit64++;
      end else begin
        out.push_back((cmds[k].len << 6) | cmds[k].pos);
        st_copies++;
        if (cmds[k].pos + cmds[k].len > 64) st_wraps++;
      end
    end
    return 1;
  endfunction

  // Pack bytes into 40-bit words, byte 0 in bits 9:0.
  function automatic void pack_words(ref int unsigned b[$], ref logic [39:0] words[$]);
    for (int k = 0; k < b.size(); k += 4) begin
      logic [39:0] wd = '0;
      for (int j = 0; j < 4; j++) wd[10*j +: 10] = 10'(b[k+j]);
      words.push_back(wd);
    end
  endfunction

  // Test data: runs of repeated patterns, counters and random stretches.
  function automatic void make_vectors(ref logic [19:0] v[$], input int n, input int seed_mix);
    int i = 0;
    while (i < n) begin
      int kind = int'($urandom_range(0, 3));
      int len  = int'($urandom_range(4, 40));
      if (kind == 0) begin                       // repeat a short loop
        int per = int'($urandom_range(1, 6));
        logic [19:0] pat [6];
        for (int k = 0; k < 6; k++) pat[k] = 20'($urandom) ^ 20'(seed_mix);
        for (int k = 0; k < len && i < n; k++, i++) v.push_back(pat[k % per]);
      end else if (kind == 1) begin              // counter on the data bits
        logic [19:0] base = 20'($urandom);
        for (int k = 0; k < len && i < n; k++, i++) v.push_back(base + 20'(k));
      end else if (kind == 2) begin              // random
        for (int k = 0; k < len && i < n; k++, i++) v.push_back(20'($urandom));
      end else begin                             // long random stretch
        for (int k = 0; k < 70 && i < n; k++, i++) v.push_back(20'($urandom));
      end
    end
  endfunction

endpackage
