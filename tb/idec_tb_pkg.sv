// idec_tb_pkg: test-side model of the off-line compressor.
//
// Given the re-encoded instruction words of each decoding table (don't-care
// bits already set equal to the row before), the class decoder_image builds
// everything the decoder is loaded with, independently of the RTL:
//   * canonical codes: tables in increasing code length; the first code of a
//     length is (previous first code + previous count) shifted left by the
//     length difference, and the codes of one length are consecutive;
//   * per column, the rows where its bit changes (bit taken as 0 before row 0);
//     a column is kept as transitions when there are at most max_trans of them
//     and they take fewer bits than the whole column, otherwise whole;
//   * the configuration writes (cfg_t) for headers, transitions and the word
//     store; bits of compressed columns are filled with random bits in the
//     word store so that only the transition path can give them right.
// It also packs a sequence of (table, row) symbols into 32-bit stream words,
// most significant bit first, recording where each symbol starts.
package idec_tb_pkg;
  import idec_pkg::*;

  class decoder_image;
    int unsigned num_luts, idx_w, max_trans, max_len;
    int unsigned len   [];
    int unsigned cnt   [];
    longint unsigned first [];
    int unsigned base  [];
    logic [31:0] rows  [][$];   // re-encoded words per table
    logic [31:0] mode  [];
    int unsigned n_compressed_cols;
    cfg_t        writes [$];
    // stream
    logic [31:0] words [$];
    longint unsigned bitpos [$];
    int unsigned sym_lut [$];
    int unsigned sym_idx [$];

    function new(int unsigned num_luts, int unsigned idx_w, int unsigned max_trans,
                 int unsigned max_len);
      this.num_luts  = num_luts;
      this.idx_w     = idx_w;
      this.max_trans = max_trans;
      this.max_len   = max_len;
      len   = new[num_luts];
      cnt   = new[num_luts];
      first = new[num_luts];
      base  = new[num_luts];
      rows  = new[num_luts];
      mode  = new[num_luts];
    endfunction

    // Canonical code assignment; returns 0 if the lengths do not fit.
    function bit assign_codes();
      longint unsigned code = 0;
      int unsigned prev = 0;
      int unsigned b = 0;
      for (int t = 0; t < num_luts; t++) begin
        cnt[t] = rows[t].size();
        if (t > 0) code = code << (len[t] - prev);
        first[t] = code;
        code += cnt[t];
        if (code > (64'd1 << len[t])) return 0;
        prev = len[t];
        base[t] = b;
        b += cnt[t];
      end
      return b <= (1 << idx_w);
    endfunction

    function cfg_t mk(cfg_kind_e kind, int unsigned lut, int unsigned col,
                      int unsigned slot, int unsigned addr, logic [31:0] data);
      cfg_t c;
      c.valid = 1'b1;
      c.kind  = kind;
      c.lut   = 8'(lut);
      c.col   = 8'(col);
      c.slot  = 8'(slot);
      c.addr  = 16'(addr);
      c.data  = data;
      return c;
    endfunction

    function void build_writes();
      n_compressed_cols = 0;
      for (int t = 0; t < num_luts; t++) begin
        writes.push_back(mk(CFG_LUT_LEN, t, 0, 0, 0, 32'h80 | len[t]));
        writes.push_back(mk(CFG_LUT_MIN, t, 0, 0, 0, 32'(first[t])));
        writes.push_back(mk(CFG_LUT_BASE, t, 0, 0, 0, base[t]));
        mode[t] = '0;
        for (int c = 0; c < 32; c++) begin
          int unsigned tr [$];
          logic prevb = 1'b0;
          for (int r = 0; r < cnt[t]; r++) begin
            if (rows[t][r][c] != prevb) tr.push_back(r);
            prevb = rows[t][r][c];
          end
          if (tr.size() <= max_trans && tr.size() * idx_w < cnt[t]) begin
            mode[t][c] = 1'b1;
            n_compressed_cols++;
            for (int s = 0; s < max_trans; s++)
              writes.push_back(mk(CFG_TRANS, t, c, s, 0,
                                  (s < tr.size()) ? (32'h8000_0000 | tr[s]) : 32'h0));
          end
        end
        writes.push_back(mk(CFG_COL_MODE, t, 0, 0, 0, mode[t]));
        for (int r = 0; r < cnt[t]; r++) begin
          logic [31:0] w = (rows[t][r] & ~mode[t]) | ($urandom() & mode[t]);
          writes.push_back(mk(CFG_RAW, t, 0, 0, base[t] + r, w));
        end
      end
    endfunction

    function void add_symbol(int unsigned t, int unsigned i);
      longint unsigned code = first[t] + i;
      longint unsigned pos = 0;
      if (bitpos.size() > 0)
        pos = bitpos[bitpos.size()-1] + len[sym_lut[sym_lut.size()-1]];
      sym_lut.push_back(t);
      sym_idx.push_back(i);
      bitpos.push_back(pos);
      for (int b = len[t] - 1; b >= 0; b--) begin
        int unsigned w = int'(pos / 32);
        int unsigned o = 31 - int'(pos % 32);
        while (words.size() <= w) words.push_back(32'h0);
        words[w][o] = code[b];
        pos++;
      end
    endfunction
  endclass

endpackage
