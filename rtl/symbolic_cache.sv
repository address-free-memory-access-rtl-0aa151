// symbolic_cache: the symbolic cache (SC) storage and its control.
//
// A small set-associative data cache addressed by the symbolic address (base
// register ID + displacement, plus P-color for stack accesses) instead of the
// memory address. Each line holds LINE_BYTES of data, a tag, a line valid bit
// and one valid bit per alignment unit (word by default). The default size is
// the design's main configuration: 4 KB, 4-way, 64-byte lines, so 16 sets,
// with index randomization. SETS = 1 gives the fully associative variant the
// design was compared with (the tag is then the whole line address).
//
// Two independent ports:
//  * Lookup (front end): lk_valid with the symbolic address and access size of
//    a load. One cycle later lk_resp_valid returns lk_hit and lk_data, the
//    speculative load value (bytes packed little-endian, zero above the access
//    size). A hit needs a matching tag and every unit touched by the access
//    valid; an access that crosses the end of the symbolic line never hits.
//  * Update (back end): up_valid when a load or store has executed, with its
//    symbolic address, size, the offset of its real address inside the L1
//    line, the L1 line itself and the access data (store data, or the value the
//    load really read). In that cycle the SC
//      1. allocates the least recently used way (an invalid one first) if no
//         tag matches, filling it with the L1 line realigned by sc_align_fill;
//         if the tag matches but some unit touched by the access is invalid,
//         the realigned L1 data fills only the invalid units;
//      2. writes the access bytes at their symbolic position, so the next load
//         with the same symbolic address sees the latest store, or the latest
//         loaded value (a wrong speculative value is corrected this way);
//      3. marks the way most recently used.
//    up_tag_hit, up_alloc and up_fill report what happened (combinational).
//
// Following the design: symbolic addressing, miss-driven realigned partial line
// fill that drops unfitted data, per-unit valid bits, set-associativity and
// index randomization. This implementation's own choices (the design leaves
// them open): one-cycle registered lookup, LRU replacement, fill on store misses
// as on load misses, writing every executed access into the SC, merging
// fill data into invalid units of a present line, and a lookup in the same
// cycle as an update seeing the state before the update.
module symbolic_cache
  import sc_pkg::*;
#(
  parameter int unsigned PCOLOR_BITS = 2,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned SETS        = 16,
  parameter int unsigned UNIT_BYTES  = 4,
  parameter bit          RANDOMIZE   = 1'b1,
  localparam int unsigned SYM_W  = SYM_BASE_W + PCOLOR_BITS,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W  = $clog2(SETS),        // 0 when fully associative
  localparam int unsigned IW     = (IDX_W > 0) ? IDX_W : 1,
  localparam int unsigned TAG_W  = SYM_W - OFF_W - IDX_W,
  localparam int unsigned NUNITS = LINE_BYTES / UNIT_BYTES,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned LBITS  = LINE_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup port
  input  logic              lk_valid,
  input  logic [SYM_W-1:0]  lk_sym,
  input  mem_size_e         lk_size,
  output logic              lk_resp_valid,
  output logic              lk_hit,
  output logic [DATA_W-1:0] lk_data,
  // update port
  input  logic              up_valid,
  input  logic [SYM_W-1:0]  up_sym,
  input  mem_size_e         up_size,
  input  logic [OFF_W-1:0]  up_real_off,
  input  logic [LBITS-1:0]  up_l1_line,
  input  logic [DATA_W-1:0] up_data,
  output logic              up_tag_hit,
  output logic              up_alloc,
  output logic              up_fill
);

  localparam int unsigned NB = DATA_W / 8;

  // ---------------------------------------------------------------- storage
  logic [TAG_W-1:0]  tag_q   [SETS][WAYS];
  logic              lv_q    [SETS][WAYS];
  logic [NUNITS-1:0] uv_q    [SETS][WAYS];
  logic [LBITS-1:0]  data_q  [SETS][WAYS];
  logic [WAY_W-1:0]  age_q   [SETS][WAYS];   // 0 = most recently used

  // units touched by an access of 'size' bytes at byte offset 'off'
  function automatic logic [NUNITS-1:0] touched_units(logic [OFF_W-1:0] off, mem_size_e size);
    logic [NUNITS-1:0] m;
    int b;
    m = '0;
    for (int k = 0; k < NB; k++) begin
      b = int'(off) + k;
      if (k < size_bytes(size) && b < LINE_BYTES) m[b / UNIT_BYTES] = 1'b1;
    end
    return m;
  endfunction

  // units completely covered by an access
  function automatic logic [NUNITS-1:0] covered_units(logic [OFF_W-1:0] off, mem_size_e size);
    logic [NUNITS-1:0] m;
    int lo, hi;
    m  = '0;
    lo = int'(off);
    hi = int'(off) + size_bytes(size);   // exclusive
    for (int u = 0; u < NUNITS; u++)
      if (u * UNIT_BYTES >= lo && (u + 1) * UNIT_BYTES <= hi) m[u] = 1'b1;
    return m;
  endfunction

  function automatic logic crosses_line(logic [OFF_W-1:0] off, mem_size_e size);
    return (int'(off) + size_bytes(size)) > LINE_BYTES;
  endfunction

  // ---------------------------------------------------------------- lookup
  logic [IW-1:0]    lk_idx;
  logic [TAG_W-1:0] lk_tag;
  logic [OFF_W-1:0] lk_off;

  if (SETS > 1) begin : g_lk_hash
    sc_index_hash #(.SYM_W(SYM_W), .OFF_W(OFF_W), .IDX_W(IDX_W), .RANDOMIZE(RANDOMIZE))
      u_lk_hash (.sym_addr(lk_sym), .index(lk_idx), .tag(lk_tag));
  end else begin : g_lk_fa
    assign lk_idx = '0;
    assign lk_tag = lk_sym[SYM_W-1:OFF_W];
  end

  assign lk_off = lk_sym[OFF_W-1:0];

  logic              lk_hit_c;
  logic [DATA_W-1:0] lk_data_c;

  always_comb begin
    logic [NUNITS-1:0] need;
    lk_hit_c  = 1'b0;
    lk_data_c = '0;
    need = touched_units(lk_off, lk_size);
    for (int w = 0; w < WAYS; w++) begin
      if (lv_q[lk_idx][w] && tag_q[lk_idx][w] == lk_tag &&
          (uv_q[lk_idx][w] & need) == need && !crosses_line(lk_off, lk_size)) begin
        lk_hit_c = 1'b1;
        for (int k = 0; k < NB; k++)
          if (k < size_bytes(lk_size) && int'(lk_off) + k < LINE_BYTES)
            lk_data_c[k*8 +: 8] = data_q[lk_idx][w][(int'(lk_off) + k)*8 +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_resp_valid <= 1'b0;
      lk_hit        <= 1'b0;
      lk_data       <= '0;
    end else begin
      lk_resp_valid <= lk_valid;
      lk_hit        <= lk_valid && lk_hit_c;
      lk_data       <= lk_valid ? lk_data_c : '0;
    end
  end

  // ---------------------------------------------------------------- update
  logic [IW-1:0]    up_idx;
  logic [TAG_W-1:0] up_tag;
  logic [OFF_W-1:0] up_off;

  if (SETS > 1) begin : g_up_hash
    sc_index_hash #(.SYM_W(SYM_W), .OFF_W(OFF_W), .IDX_W(IDX_W), .RANDOMIZE(RANDOMIZE))
      u_up_hash (.sym_addr(up_sym), .index(up_idx), .tag(up_tag));
  end else begin : g_up_fa
    assign up_idx = '0;
    assign up_tag = up_sym[SYM_W-1:OFF_W];
  end

  assign up_off = up_sym[OFF_W-1:0];

  logic [LBITS-1:0]  fill_line;
  logic [NUNITS-1:0] fill_valid;

  sc_align_fill #(.LINE_BYTES(LINE_BYTES), .UNIT_BYTES(UNIT_BYTES))
    u_align (.l1_line(up_l1_line), .real_off(up_real_off), .sym_off(up_off),
             .fill_line(fill_line), .fill_valid(fill_valid));

  logic [WAY_W-1:0]  up_way;
  logic [LBITS-1:0]  new_line;
  logic [NUNITS-1:0] new_uv;

  always_comb begin
    logic             found, have_inv;
    logic [WAY_W-1:0] hit_way, inv_way, lru_way;
    logic [NUNITS-1:0] need, fmask;
    found = 1'b0; have_inv = 1'b0;
    hit_way = '0; inv_way = '0; lru_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (lv_q[up_idx][w] && tag_q[up_idx][w] == up_tag) begin
        found = 1'b1; hit_way = WAY_W'(w);
      end
      if (!lv_q[up_idx][w]) begin
        have_inv = 1'b1; inv_way = WAY_W'(w);
      end
      if (age_q[up_idx][w] == WAY_W'(WAYS - 1)) lru_way = WAY_W'(w);
    end
    up_tag_hit = found;
    up_alloc   = !found;
    up_way     = found ? hit_way : (have_inv ? inv_way : lru_way);

    need = touched_units(up_off, up_size);
    // start from the current line (hit) or from an empty one (allocation)
    new_line = found ? data_q[up_idx][hit_way] : '0;
    new_uv   = found ? uv_q[up_idx][hit_way]   : '0;
    // realigned L1 data goes only into units that are not valid yet
    up_fill  = !found || ((new_uv & need) != need);
    fmask    = up_fill ? (fill_valid & ~new_uv) : '0;
    for (int u = 0; u < NUNITS; u++)
      if (fmask[u]) new_line[u*UNIT_BYTES*8 +: UNIT_BYTES*8] = fill_line[u*UNIT_BYTES*8 +: UNIT_BYTES*8];
    new_uv = new_uv | fmask;
    // the access itself, at its symbolic position
    for (int k = 0; k < NB; k++)
      if (k < size_bytes(up_size) && int'(up_off) + k < LINE_BYTES)
        new_line[(int'(up_off) + k)*8 +: 8] = up_data[k*8 +: 8];
    new_uv = new_uv | covered_units(up_off, up_size);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          lv_q[s][w]  <= 1'b0;
          uv_q[s][w]  <= '0;
          tag_q[s][w] <= '0;
          age_q[s][w] <= WAY_W'(w);
        end
    end else if (up_valid) begin
      lv_q[up_idx][up_way]   <= 1'b1;
      tag_q[up_idx][up_way]  <= up_tag;
      uv_q[up_idx][up_way]   <= new_uv;
      for (int w = 0; w < WAYS; w++)
        if (WAY_W'(w) == up_way)
          age_q[up_idx][w] <= '0;
        else if (age_q[up_idx][w] < age_q[up_idx][up_way])
          age_q[up_idx][w] <= age_q[up_idx][w] + 1'b1;
    end
  end

  // a hit is only reported as part of a lookup response
  a_hit_needs_resp: assert property (@(posedge clk) disable iff (!rst_n) lk_hit |-> lk_resp_valid);
  // an update that allocates never reports a tag hit
  a_alloc_xor_hit: assert property (@(posedge clk) disable iff (!rst_n) up_valid |-> (up_alloc != up_tag_hit));

  // line data: no reset, only read under a valid bit
  always_ff @(posedge clk) begin
    if (up_valid) data_q[up_idx][up_way] <= new_line;
  end

endmodule
