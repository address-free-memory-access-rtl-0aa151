// sc_ref_pkg: reference model of the symbolic cache used by the testbenches.
//
// Written independently of the RTL, in plain procedural code: lines are byte
// arrays, replacement is tracked with last-use time stamps, and the set index
// is computed bit by bit from the formula (index bit i = symbolic bit 6+i XOR
// symbolic bit 16+i). The behaviour it models is the one the RTL documents:
// realigned partial fill on a miss (or into the invalid units of a present
// line), then the access bytes written at their symbolic position.
package sc_ref_pkg;

  class sc_model;
    int sets, ways, line_bytes, unit_bytes, sym_w, off_w, idx_w;
    bit randomize;
    longint tag[][];
    bit     lv[][];
    bit     uv[][][];
    byte    data[][][];
    longint stamp[][];
    longint now;
    // what the last update did
    bit last_alloc, last_fill, last_evict;

    function new(int sets_, int ways_, int line_bytes_, int unit_bytes_, int pcolor_bits_, bit randomize_);
      sets = sets_; ways = ways_; line_bytes = line_bytes_; unit_bytes = unit_bytes_;
      sym_w = 21 + pcolor_bits_; randomize = randomize_;
      off_w = $clog2(line_bytes); idx_w = $clog2(sets);
      tag = new[sets]; lv = new[sets]; uv = new[sets]; data = new[sets]; stamp = new[sets];
      foreach (tag[s]) begin
        tag[s] = new[ways]; lv[s] = new[ways]; uv[s] = new[ways]; data[s] = new[ways]; stamp[s] = new[ways];
        for (int w = 0; w < ways; w++) begin
          uv[s][w] = new[line_bytes / unit_bytes];
          data[s][w] = new[line_bytes];
          lv[s][w] = 0; stamp[s][w] = 0;
        end
      end
      now = 0;
    endfunction

    function int index_of(longint sym);
      int idx = 0;
      for (int i = 0; i < idx_w; i++) begin
        bit b = sym[off_w + i];
        if (randomize && (16 + i) < sym_w) b = b ^ sym[16 + i];
        idx = idx | (int'(b) << i);
      end
      return idx;
    endfunction

    function longint tag_of(longint sym);
      return (sym & ((64'd1 << sym_w) - 1)) >> (off_w + idx_w);
    endfunction

    function int find(longint sym);
      int s = index_of(sym);
      for (int w = 0; w < ways; w++)
        if (lv[s][w] && tag[s][w] == tag_of(sym)) return w;
      return -1;
    endfunction

    // size in bytes (1, 2 or 4)
    function bit lookup(longint sym, int size, output logic [31:0] val);
      int s = index_of(sym), w = find(sym), off = int'(sym % line_bytes);
      val = 0;
      if (w < 0 || off + size > line_bytes) return 0;
      for (int k = 0; k < size; k++)
        if (!uv[s][w][(off + k) / unit_bytes]) return 0;
      for (int k = 0; k < size; k++) val[k*8 +: 8] = data[s][w][off + k];
      return 1;
    endfunction

    function void update(longint sym, int size, int real_off, byte l1[], logic [31:0] val);
      int s = index_of(sym), w = find(sym), off = int'(sym % line_bytes);
      int nu = line_bytes / unit_bytes, su, ru;
      bit need_fill = 0;
      last_alloc = 0; last_evict = 0;
      if (w < 0) begin
        last_alloc = 1;
        w = -1;
        for (int x = 0; x < ways; x++) if (!lv[s][x] && w < 0) w = x;
        if (w < 0) begin
          last_evict = 1;
          w = 0;
          for (int x = 1; x < ways; x++) if (stamp[s][x] < stamp[s][w]) w = x;
        end
        lv[s][w] = 1; tag[s][w] = tag_of(sym);
        for (int u = 0; u < nu; u++) uv[s][w][u] = 0;
        for (int b = 0; b < line_bytes; b++) data[s][w][b] = 0;
        need_fill = 1;
      end else begin
        for (int k = 0; k < size; k++)
          if (off + k < line_bytes && !uv[s][w][(off + k) / unit_bytes]) need_fill = 1;
      end
      last_fill = need_fill;
      if (need_fill) begin
        su = off / unit_bytes; ru = real_off / unit_bytes;
        for (int u = 0; u < nu; u++) begin
          int src = u - su + ru;
          if (src >= 0 && src < nu && !uv[s][w][u]) begin
            for (int b = 0; b < unit_bytes; b++) data[s][w][u*unit_bytes + b] = l1[src*unit_bytes + b];
            uv[s][w][u] = 1;
          end
        end
      end
      for (int k = 0; k < size; k++)
        if (off + k < line_bytes) data[s][w][off + k] = val[k*8 +: 8];
      for (int u = 0; u < nu; u++)
        if (u * unit_bytes >= off && (u + 1) * unit_bytes <= off + size) uv[s][w][u] = 1;
      now++;
      stamp[s][w] = now;
    endfunction
  endclass

endpackage
