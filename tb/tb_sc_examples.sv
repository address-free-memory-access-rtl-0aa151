// tb_sc_examples: runs two small MIPS32 code sequences through the
// symbolic-cache predictor (default configuration) and checks that the loads
// whose values follow from program syntax are predicted correctly.
//
//  1. A bit-stream writer called repeatedly (after bzip2's bsW): three global
//     variables are loaded and stored through $gp in every call; the callee
//     reuses the caller's $s1 for a local value and the caller restores it.
//     From the second call on every $gp load must be predicted correctly, and
//     the caller's load through the restored $s1 as well.
//  2. A list-copy routine (after parser's copy_disjunct): a prologue saves
//     $ra/$s0/$s1 to the stack, two nested calls save their own registers at
//     the same $sp displacements, records are copied through $s0/$s1 with
//     small displacements, and the epilogue restores the registers. Thanks to
//     the P-color the epilogue's restores must all be predicted correctly,
//     although the callees wrote the same ($sp, displacement) pairs.
//
// The testbench executes the instructions itself (registers, byte memory,
// L1 lines) one instruction every two cycles: fetch, then execute with the
// prediction read one cycle after fetch.
module tb_sc_examples;
  import sc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              f_valid;
  logic [31:0]       f_instr;
  logic              p_valid, p_is_load, p_is_store, p_hit;
  logic [22:0]       p_sym;
  mem_size_e         p_size;
  logic [31:0]       p_data, p_value;
  logic [1:0]        pcolor;
  logic              r_valid, r_is_load, r_pred_hit;
  logic [22:0]       r_sym;
  mem_size_e         r_size;
  logic [31:0]       r_addr, r_data, r_pred_data;
  logic [511:0]      r_l1_line;
  logic              r_correct, r_mispredict, r_fill;

  sc_predictor dut (.*);

  int checks = 0, failures = 0;
  int n_loads = 0, n_correct = 0, n_calls = 0, n_rets = 0, n_restore_ok = 0, n_global_ok = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  byte         mem[int unsigned];
  int unsigned regs[32];
  bit          last_correct;

  function automatic byte rd(int unsigned a);
    return mem.exists(a) ? mem[a] : byte'(a ^ (a >> 8));
  endfunction

  localparam int ZERO = 0, V0 = 2, T0 = 8, T1 = 9, S0 = 16, S1 = 17, GP = 28, SP = 29, RA = 31, A0 = 4, A1 = 5;

  // fetch one instruction, then execute it
  task automatic run(logic [31:0] ins);
    logic [5:0] op = ins[31:26];
    int rs = int'(ins[25:21]), rt = int'(ins[20:16]);
    int imm = int'($signed(ins[15:0]));
    @(negedge clk);
    f_valid = 1; f_instr = ins;
    @(negedge clk);
    f_valid = 0;
    r_valid = 0;
    last_correct = 0;
    if (op inside {6'h23, 6'h2B}) begin
      int unsigned a = regs[rs] + imm;
      check(p_valid, "prediction one cycle after fetch");
      for (int b = 0; b < 64; b++) r_l1_line[b*8 +: 8] = rd((a & ~32'd63) + b);
      r_valid = 1; r_is_load = (op == 6'h23); r_sym = p_sym; r_size = p_size; r_addr = a;
      r_pred_hit = p_hit; r_pred_data = p_data;
      if (op == 6'h23) begin
        for (int k = 0; k < 4; k++) r_data[k*8 +: 8] = rd(a + k);
        #1;
        n_loads++;
        last_correct = r_correct;
        n_correct += r_correct;
        check(r_correct == (p_hit && p_data == r_data), "verdict");
        regs[rt] = r_data;
      end else begin
        r_data = regs[rt];
        for (int k = 0; k < 4; k++) mem[a + k] = r_data[k*8 +: 8];
      end
    end else if (op == 6'h09) regs[rt] = regs[rs] + imm;          // addiu
    else if (op == 6'h0F) regs[rt] = int'(ins[15:0]) << 16;        // lui
    else if (op == 6'h0D) regs[rt] = regs[rs] | int'(ins[15:0]);   // ori
    else if (op == 6'h03) begin regs[RA] = 32'h0040_0000 + (int'(ins[25:0]) << 2); n_calls++; end
    else if (op == 6'h00 && ins[5:0] == 6'h08) n_rets++;
    regs[0] = 0;
    @(posedge clk);
    #1 r_valid = 0;
  endtask

  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] LW(int rt, int d, int rs); return I(6'h23, rs, rt, d); endfunction
  function automatic logic [31:0] SW(int rt, int d, int rs); return I(6'h2B, rs, rt, d); endfunction
  function automatic logic [31:0] ADDIU(int rt, int rs, int imm); return I(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] JAL(int tgt); return {6'h03, 26'(tgt)}; endfunction
  localparam logic [31:0] JR_RA = {6'h00, 5'd31, 15'd0, 6'h08};

  task automatic li(int r, int unsigned v);
    run(I(6'h0F, 0, r, int'(v >> 16)));
    run(I(6'h0D, r, r, int'(v & 32'hFFFF)));
  endtask

  // ----------------------------------------------------------- example 1
  localparam int BS_BUFF = -32760, BS_LIVE = -32756, BYTES_OUT = -32752;

  task automatic bsw(int call_no);
    bit later = call_no > 0;
    run(ADDIU(S1, A1, 0));                 // callee reuses $s1 for v
    run(LW(V0, BS_LIVE, GP));   if (later) begin check(last_correct, "bsW: bsLive"); n_global_ok += last_correct; end
    run(LW(T0, BS_BUFF, GP));   if (later) begin check(last_correct, "bsW: bsBuff"); n_global_ok += last_correct; end
    run(ADDIU(T0, T0, 1));
    run(SW(T0, BS_BUFF, GP));
    run(LW(T1, BYTES_OUT, GP)); if (later) begin check(last_correct, "bsW: bytesOut"); n_global_ok += last_correct; end
    run(ADDIU(T1, T1, 1));
    run(SW(T1, BYTES_OUT, GP));
    run(LW(T0, BS_BUFF, GP));   check(last_correct, "bsW: bsBuff after store"); n_global_ok += last_correct;
    run(ADDIU(V0, V0, 8));
    run(SW(V0, BS_LIVE, GP));
    run(JR_RA);
  endtask

  // ----------------------------------------------------------- example 2
  task automatic callee(int tag);
    run(ADDIU(SP, SP, -32));
    run(SW(RA, 28, SP));
    run(SW(S0, 24, SP));
    li(S0, 32'h1003_0000 + tag * 64);      // callee clobbers $s0
    run(SW(ZERO, 0, S0));
    run(LW(RA, 28, SP));
    run(LW(S0, 24, SP));
    run(ADDIU(SP, SP, 32));
    run(JR_RA);
  endtask

  task automatic copy_disjunct(int n);
    run(ADDIU(SP, SP, -32));
    run(SW(RA, 28, SP));
    run(SW(S0, 24, SP));
    run(SW(S1, 20, SP));
    run(ADDIU(S0, A0, 0));                  // d
    run(JAL(16'h100));                      // xalloc
    callee(2 * n);
    run(ADDIU(S1, V0, 0));                  // new record
    for (int f = 0; f < 3; f++) begin       // copy three fields
      run(LW(T0, 4 * f, S0));
      run(SW(T0, 4 * f, S1));
    end
    run(JAL(16'h200));                      // copy_connectors
    callee(2 * n + 1);
    run(LW(RA, 28, SP)); check(last_correct, "copy_disjunct: restore $ra"); n_restore_ok += last_correct;
    run(LW(S0, 24, SP)); check(last_correct, "copy_disjunct: restore $s0"); n_restore_ok += last_correct;
    run(LW(S1, 20, SP)); check(last_correct, "copy_disjunct: restore $s1"); n_restore_ok += last_correct;
    run(ADDIU(SP, SP, 32));
    run(JR_RA);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_valid = 0; f_instr = '0; r_valid = 0; r_is_load = 0; r_sym = '0; r_size = SZ_WORD;
    r_addr = '0; r_data = '0; r_pred_hit = 0; r_pred_data = '0; r_l1_line = '0;
    regs = '{default: 0};
    regs[SP] = 32'h7FFF_EFF0; regs[GP] = 32'h1000_8000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // example 1: caller loop (SendMTFValues-like)
    li(S1, 32'h1002_0040);
    for (int c = 0; c < 4; c++) begin
      run(LW(T0, 0, S1)); if (c > 0) begin check(last_correct, "caller: load through restored $s1"); n_restore_ok += last_correct; end
      run(SW(S1, 16, SP));                  // save $s1
      run(ADDIU(A1, ZERO, 5 + c));
      run(JAL(16'h300));
      bsw(c);
      run(LW(S1, 16, SP));                  // restore $s1
    end
    // example 2: copy a list of four records
    for (int n = 0; n < 4; n++) begin
      li(A0, 32'h1004_0000 + n * 128);
      li(V0, 32'h1005_0000 + n * 128);
      run(JAL(16'h400));
      copy_disjunct(n);
    end
    $display("loads=%0d correct=%0d calls=%0d returns=%0d restores_ok=%0d globals_ok=%0d",
             n_loads, n_correct, n_calls, n_rets, n_restore_ok, n_global_ok);
    check(n_calls == 16 && n_rets == 16, "calls and returns executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
