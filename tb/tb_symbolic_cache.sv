// tb_symbolic_cache: random lookups and updates of the symbolic cache at its
// default size (4 KB, 4-way, 64-byte lines, word units, 2-bit P-color),
// compared each cycle with the reference model in sc_ref_pkg. Symbolic
// addresses are drawn from a small pool of base registers, displacements and
// colours so that hits, partial fills, conflicts and LRU evictions all occur;
// each of them is counted and must occur. The lookup result is checked one
// cycle after the request (the lookup latency).
module tb_symbolic_cache;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int SYM_W = 23;
  localparam int LB = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              lk_valid, lk_resp_valid, lk_hit;
  logic [SYM_W-1:0]  lk_sym, up_sym;
  mem_size_e         lk_size, up_size;
  logic [DATA_W-1:0] lk_data, up_data;
  logic              up_valid, up_tag_hit, up_alloc, up_fill;
  logic [5:0]        up_real_off;
  logic [LB*8-1:0]   up_l1_line;

  symbolic_cache dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_partial = 0, n_shift = 0;
  sc_model m;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [SYM_W-1:0] rand_sym(output mem_size_e sz);
    logic [4:0] regs[5] = '{5'd29, 5'd30, 5'd28, 5'd4, 5'd16};
    logic [4:0] r = regs[$urandom_range(0, 4)];
    int d;
    int kind = $urandom_range(0, 9);
    sz = kind < 7 ? SZ_WORD : (kind < 9 ? SZ_HALF : SZ_BYTE);
    // displacements cluster on a few lines, plus occasional far ones
    d = $urandom_range(0, 31) * 4 + ($urandom_range(0, 7) == 0 ? $urandom_range(0, 63) * 1024 : 0);
    if (sz == SZ_HALF) d += 2 * $urandom_range(0, 1);
    if (sz == SZ_BYTE) d += $urandom_range(0, 3);
    return {2'($urandom_range(0, 3)), r, 16'(d)};
  endfunction

  function automatic int nbytes(mem_size_e s);
    return s == SZ_BYTE ? 1 : (s == SZ_HALF ? 2 : 4);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte l1[];
    logic [31:0] exp_val;
    bit exp_hit, lk_was;
    mem_size_e lsz;
    m = new(16, 4, 64, 4, 2, 1);
    l1 = new[LB];
    lk_valid = 0; up_valid = 0; lk_sym = '0; up_sym = '0; lk_size = SZ_WORD; up_size = SZ_WORD;
    up_data = '0; up_real_off = '0; up_l1_line = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int it = 0; it < 20000; it++) begin
      // lookup request
      lk_valid = $urandom_range(0, 1);
      lk_sym = rand_sym(lsz);
      lk_size = lsz;
      lk_was = lk_valid;
      exp_hit = m.lookup(lk_sym, nbytes(lk_size), exp_val);
      // update request
      up_valid = $urandom_range(0, 3) != 0;
      up_sym = rand_sym(lsz);
      up_size = lsz;
      up_real_off = ($urandom_range(0, 3) == 0) ? 6'($urandom_range(0, 63)) : up_sym[5:0];
      if (up_size == SZ_WORD) up_real_off[1:0] = 2'b00;
      if (up_size == SZ_HALF) up_real_off[0] = 1'b0;
      for (int b = 0; b < LB; b++) begin
        l1[b] = byte'($urandom);
        up_l1_line[b*8 +: 8] = l1[b];
      end
      up_data = $urandom;
      #1;
      if (up_valid) begin
        int w;
        w = m.find(up_sym);
        check(up_tag_hit == (w >= 0), "up_tag_hit");
        check(up_alloc == (w < 0), "up_alloc");
        m.update(up_sym, nbytes(up_size), int'(up_real_off), l1, up_data);
        check(up_fill == m.last_fill, "up_fill");
        if (m.last_evict) n_evict++;
        if (m.last_fill && !m.last_alloc) n_partial++;
        if (m.last_fill && up_real_off[5:2] != up_sym[5:2]) n_shift++;
      end
      @(posedge clk);
      #1;
      check(lk_resp_valid == lk_was, "lk_resp_valid");
      if (lk_was) begin
        check(lk_hit == exp_hit, "lk_hit");
        if (exp_hit) begin
          n_hit++;
          check(lk_data == (exp_val & (32'hFFFF_FFFF >> (8 * (4 - nbytes(lk_size))))), "lk_data");
        end else n_miss++;
      end
      @(negedge clk);
    end
    $display("hits=%0d misses=%0d evictions=%0d partial_refills=%0d shifted_fills=%0d",
             n_hit, n_miss, n_evict, n_partial, n_shift);
    check(n_hit > 0, "some hits");
    check(n_miss > 0, "some misses");
    check(n_evict > 0, "some evictions");
    check(n_partial > 0, "some partial refills");
    check(n_shift > 0, "some realigned fills");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
