// sc_cfg_run: drives one sc_predictor of a given configuration (P-color
// width, alignment unit, index randomization) with the random program of
// tb_sc_predictor and checks it against the reference model of the same
// configuration. Calls, returns, hits, misses, right and wrong speculations
// must each occur. Reports its counts and raises done; the enclosing testbench
// prints the result and ends the simulation.
module sc_cfg_run
  import sc_pkg::*;
  import sc_ref_pkg::*;
#(
  parameter int PCOLOR_BITS = 2,
  parameter int UNIT_BYTES  = 4,
  parameter bit RANDOMIZE   = 1'b1,
  parameter int WAYS        = 4,
  parameter int SETS        = 16,
  parameter int N_INSTR     = 10000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_loads,
  output int   n_correct
);
  localparam int SYM_W = 21 + PCOLOR_BITS;
  localparam int PC_W  = PCOLOR_BITS > 0 ? PCOLOR_BITS : 1;
  localparam int LB = 64;

  logic rst_n = 0;

  logic              f_valid;
  logic [31:0]       f_instr;
  logic              p_valid, p_is_load, p_is_store, p_hit;
  logic [SYM_W-1:0]  p_sym;
  mem_size_e         p_size;
  logic [31:0]       p_data, p_value;
  logic [PC_W-1:0]   pcolor;
  logic              r_valid, r_is_load, r_pred_hit;
  logic [SYM_W-1:0]  r_sym;
  mem_size_e         r_size;
  logic [31:0]       r_addr, r_data, r_pred_data;
  logic [LB*8-1:0]   r_l1_line;
  logic              r_correct, r_mispredict, r_fill;

  sc_predictor #(.PCOLOR_BITS(PCOLOR_BITS), .UNIT_BYTES(UNIT_BYTES), .RANDOMIZE(RANDOMIZE), .WAYS(WAYS), .SETS(SETS)) dut (.*);

  int n_call = 0, n_ret = 0, n_hit = 0, n_miss = 0, n_wrong = 0;
  int n_evict = 0, n_partial = 0, n_shift = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ program state
  byte         mem[int unsigned];
  int unsigned regs[32];
  int          depth;
  sc_model     m;

  function automatic byte rd(int unsigned a);
    if (mem.exists(a)) return mem[a];
    return byte'((a * 32'h9E37_79B1) >> 13);
  endfunction

  function automatic int nbytes(mem_size_e s);
    return s == SZ_BYTE ? 1 : (s == SZ_HALF ? 2 : 4);
  endfunction

  function automatic logic [31:0] itype(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // the instruction in flight between fetch and execute
  typedef struct {
    bit          valid, mem_op, load, sgn;
    mem_size_e   size;
    int          base;
    int          disp;
    logic [SYM_W-1:0] sym;
    bit          exp_hit;
    logic [31:0] exp_val;
  } inflight_t;

  function automatic inflight_t empty_inflight();
    inflight_t e;
    e.valid = 0; e.mem_op = 0; e.load = 0; e.sgn = 0; e.size = SZ_WORD;
    e.base = 0; e.disp = 0; e.sym = '0; e.exp_hit = 0; e.exp_val = '0;
    return e;
  endfunction

  // generate the next instruction word, updating the program's registers for
  // the non-memory instructions (their effect is architectural state only)
  function automatic logic [31:0] next_instr();
    int r = $urandom_range(0, 99);
    int pool_base[4] = '{16, 17, 4, 20};
    if (r < 5) begin
      depth++; n_call++;
      regs[29] -= 64;            // callee frame
      return {6'h03, 26'h40};    // jal
    end
    if (r < 10 && depth > 0) begin
      depth--; n_ret++;
      regs[29] += 64;
      return {6'h00, 5'd31, 15'd0, 6'h08};   // jr $ra
    end
    if (r < 16) begin
      // a pointer register gets a new value, sometimes its previous one again
      int b = pool_base[$urandom_range(0, 3)];
      regs[b] = 32'h1001_0000 + 32'($urandom_range(0, 15)) * 36;
      return itype(6'h0F, 0, b, 0);          // lui-like ALU instruction
    end
    begin
      int bases[7] = '{29, 30, 28, 16, 4, 17, 20};
      int b = bases[$urandom_range(0, 6)];
      int kind = $urandom_range(0, 9);
      int op, d;
      bit ld = $urandom_range(0, 9) < 6;
      d = (b == 28) ? -32768 + 4 * $urandom_range(0, 23) : (b == 16 || b == 4 || b == 17 || b == 20) ? 64 * $urandom_range(0, 7) + 4 * $urandom_range(0, 15) : 4 * $urandom_range(0, 11);
      if (kind < 8)      op = ld ? 6'h23 : 6'h2B;
      else if (kind < 9) begin op = ld ? ($urandom_range(0, 1) ? 6'h21 : 6'h25) : 6'h29; d += 2 * $urandom_range(0, 1); end
      else               begin op = ld ? ($urandom_range(0, 1) ? 6'h20 : 6'h24) : 6'h28; d += $urandom_range(0, 3); end
      return itype(op, b, 2, d);
    end
  endfunction

  initial begin
    inflight_t cur, nxt;
    byte l1[];
    int n_instr = N_INSTR;
    done = 0; checks = 0; failures = 0; n_loads = 0; n_correct = 0;
    m = new(SETS, WAYS, 64, UNIT_BYTES, PCOLOR_BITS, RANDOMIZE);
    l1 = new[LB];
    regs = '{default: 0};
    regs[29] = 32'h7FFF_F000; regs[30] = 32'h7FFF_F800; regs[28] = 32'h1000_8000;
    regs[16] = 32'h1001_0024; regs[17] = 32'h1001_0048; regs[4] = 32'h1001_0000; regs[20] = 32'h1001_0090;
    depth = 0;
    f_valid = 0; f_instr = '0; r_valid = 0; r_is_load = 0; r_sym = '0; r_size = SZ_WORD;
    r_addr = '0; r_data = '0; r_pred_hit = 0; r_pred_data = '0; r_l1_line = '0;
    cur = empty_inflight();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i <= n_instr; i++) begin
      @(negedge clk);
      // colour after every call/return fetched so far
      if (PCOLOR_BITS > 0) check(pcolor == PC_W'(depth), "pcolor");
      // ---- fetch instruction i (none after the last one)
      nxt = empty_inflight();
      f_valid = (i < n_instr);
      if (f_valid) begin
        int dcol;
        f_instr = next_instr();
        dcol = depth;  // colour seen by a memory op is the depth before it
        nxt.valid  = 1;
        nxt.load   = f_instr[31:26] inside {6'h20, 6'h21, 6'h23, 6'h24, 6'h25};
        nxt.mem_op = nxt.load || (f_instr[31:26] inside {6'h28, 6'h29, 6'h2B});
        nxt.sgn    = f_instr[31:26] inside {6'h20, 6'h21};
        nxt.size   = (f_instr[31:26] inside {6'h20, 6'h24, 6'h28}) ? SZ_BYTE :
                     (f_instr[31:26] inside {6'h21, 6'h25, 6'h29}) ? SZ_HALF : SZ_WORD;
        nxt.base   = int'(f_instr[25:21]);
        nxt.disp   = int'($signed(f_instr[15:0]));
        nxt.sym    = SYM_W'(f_instr[25:21]) << 16 | SYM_W'(f_instr[15:0]);
        if (PCOLOR_BITS > 0 && (nxt.base == 29 || nxt.base == 30))
          nxt.sym = nxt.sym | (SYM_W'(dcol % (1 << PCOLOR_BITS)) << 21);
        // the lookup sees the SC before the update of the instruction ahead
        if (nxt.load) nxt.exp_hit = m.lookup(nxt.sym, nbytes(nxt.size), nxt.exp_val);
      end
      // ---- execute instruction i-1 (fetched in the previous cycle)
      r_valid = 0;
      if (cur.valid && cur.mem_op) begin
        automatic int unsigned a = regs[cur.base] + cur.disp;
        automatic int unsigned la = a & ~32'(LB - 1);
        automatic logic [31:0] real_val = '0;
        check(p_valid && p_is_load == cur.load && p_is_store == !cur.load, "p_valid/kind one cycle after fetch");
        check(p_sym == cur.sym, "symbolic address");
        check(p_size == cur.size, "size");
        for (int b = 0; b < LB; b++) begin
          l1[b] = rd(la + b);
          r_l1_line[b*8 +: 8] = l1[b];
        end
        r_valid = 1; r_is_load = cur.load; r_sym = p_sym; r_size = p_size; r_addr = a;
        r_pred_hit = p_hit; r_pred_data = p_data;
        if (cur.load) begin
          logic [31:0] ext;
          n_loads++;
          for (int k = 0; k < nbytes(cur.size); k++) real_val[k*8 +: 8] = rd(a + k);
          check(p_hit == cur.exp_hit, "prediction hit");
          if (cur.exp_hit) begin
            n_hit++;
            check(p_data == cur.exp_val, "prediction value");
            ext = cur.size == SZ_BYTE ? (cur.sgn ? 32'($signed(cur.exp_val[7:0])) : {24'b0, cur.exp_val[7:0]}) :
                  cur.size == SZ_HALF ? (cur.sgn ? 32'($signed(cur.exp_val[15:0])) : {16'b0, cur.exp_val[15:0]}) :
                  cur.exp_val;
            check(p_value == ext, "extended value");
          end else n_miss++;
          r_data = real_val;
        end else begin
          r_data = $urandom;
          if (cur.size == SZ_BYTE) r_data[31:8] = '0;
          if (cur.size == SZ_HALF) r_data[31:16] = '0;
        end
        #1;
        if (cur.load) begin
          automatic bit ok = cur.exp_hit && cur.exp_val == real_val;
          check(r_correct == ok, "r_correct");
          check(r_mispredict == (cur.exp_hit && !ok), "r_mispredict");
          if (ok) n_correct++;
          if (cur.exp_hit && !ok) n_wrong++;
        end
        m.update(cur.sym, nbytes(cur.size), int'(a % LB), l1, r_data);
        check(r_fill == m.last_fill, "fill");
        if (m.last_evict) n_evict++;
        if (m.last_fill && !m.last_alloc) n_partial++;
        if (m.last_fill && (a % LB) / 4 != int'(cur.sym[5:2])) n_shift++;
        // P-color: a stack store at the same ($sp, disp) in a different frame
        if (!cur.load)
          for (int k = 0; k < nbytes(cur.size); k++) mem[a + k] = r_data[k*8 +: 8];
      end else if (cur.valid) begin
        check(!p_valid, "no prediction for a non-memory instruction");
      end
      cur = nxt;
    end
    @(negedge clk);
    f_valid = 0; r_valid = 0;
    $display("loads=%0d hits=%0d misses=%0d correct=%0d wrong=%0d accuracy=%0d%%",
             n_loads, n_hit, n_miss, n_correct, n_wrong, (100 * n_correct) / (n_loads > 0 ? n_loads : 1));
    $display("calls=%0d returns=%0d evictions=%0d partial_refills=%0d realigned_fills=%0d",
             n_call, n_ret, n_evict, n_partial, n_shift);
    check(n_call > 0, "call seen");
    check(n_ret > 0, "return seen");
    check(n_hit > 0, "hit seen");
    check(n_miss > 0, "miss seen");
    check(n_correct > 0, "correct speculation seen");
    check(n_wrong > 0, "wrong speculation seen");
    done = 1;
  end
endmodule
