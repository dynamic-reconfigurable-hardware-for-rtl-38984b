// Reference decoder for the testbenches: the arithmetic decoder and a copy
// of the probability estimator's adaptive binary trees, written as plain
// software. Given one block's bytes and the context of every symbol (which
// a real decoder would rebuild from the symbols already decoded), it
// recovers the symbols. Also a model of the general-data context tree.
package codec_ref_pkg;

  class decoder;
    int lps [64];
    bit [6:0] node [int];   // {mps, state} per ctx*256 + tree node
    byte unsigned bytes [$];
    int a, d, pos;

    function new();
      int v;
      v = 16128;
      for (int s = 0; s < 64; s++) begin
        lps[s] = (v / 256 < 1) ? 1 : v / 256;
        v = v - v / 16;
      end
    endfunction

    function void clear_stats();
      node.delete();
    endfunction

    function bit next_bit();
      bit b;
      b = (pos / 8 < bytes.size()) ? bytes[pos / 8][7 - pos % 8] : 1'b0;
      pos++;
      return b;
    endfunction

    function void start_block(byte unsigned blk [$]);
      bytes = blk;
      pos = 0; a = 255; d = 0;
      for (int i = 0; i < 8; i++) d = (d << 1) | int'(next_bit());
    endfunction

    function bit decode_decision(int key);
      bit [6:0] st;
      int q, s;
      bit m, b;
      st = node.exists(key) ? node[key] : 7'd0;
      m = st[6]; s = st[5:0];
      q = lps[s];
      if (d < a - q) begin b = m; a = a - q; end
      else begin b = ~m; d = d - (a - q); a = q; end
      while (a < 128) begin a = a << 1; d = (d << 1) | int'(next_bit()); end
      if (b == m) s = (s == 63) ? 63 : s + 1;
      else if (s == 0) m = ~m;
      else s = s / 2;
      node[key] = {m, 6'(s)};
      return b;
    endfunction

    function int decode_symbol(int ctx);
      int n;
      n = 1;
      for (int i = 0; i < 8; i++) n = n * 2 + int'(decode_decision(ctx * 256 + n));
      return n - 256;
    endfunction
  endclass

  // hashed context tree of the general-data modeller
  class data_model;
    int m_area [int], m_prefix [int], m_sym [int];
    int m_next;
    int m_hist [$];
    int n_match, n_new, n_coll, n_full;

    function new();
      reset();
      n_match = 0; n_new = 0; n_coll = 0; n_full = 0;
    endfunction

    function void reset();
      m_area.delete(); m_prefix.delete(); m_sym.delete();
      m_next = 1;
      m_hist.delete();
    endfunction

    // context of byte x; updates the tree and history
    function int step(int x, bit last);
      int parent, ctx;
      bit stop;
      parent = 0; stop = 0; ctx = 0;
      foreach (m_hist[lvl]) begin
        bit matched;
        if (stop) break;
        matched = 0;
        for (int p = 0; p < 4; p++) begin
          int idx;
          idx = (((m_hist[lvl] * 4) ^ parent) & 1023) + p;
          if (m_area.exists(idx)) begin
            if (m_prefix[idx] == parent && m_sym[idx] == m_hist[lvl]) begin
              ctx = m_area[idx];
              parent = m_area[idx];
              matched = 1;
              n_match++;
              break;
            end
            n_coll++;
          end else begin
            if (m_next <= 1023) begin
              m_area[idx] = m_next; m_prefix[idx] = parent; m_sym[idx] = m_hist[lvl];
              m_next++;
              n_new++;
            end else n_full++;
            break;
          end
        end
        if (!matched) stop = 1;
      end
      m_hist.push_front(x);
      if (m_hist.size() > 3) void'(m_hist.pop_back());
      if (last) reset();
      return ctx;
    endfunction
  endclass

endpackage
