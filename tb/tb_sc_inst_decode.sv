// tb_sc_inst_decode: drives random and hand-picked MIPS32 instruction words
// into the decoder and checks every field against a table-driven expectation
// written here (opcode numbers from the MIPS32 encoding).
module tb_sc_inst_decode;
  import sc_pkg::*;

  logic [31:0] instr;
  dec_t dec;
  sc_inst_decode dut (.instr, .dec);

  int checks = 0, failures = 0;
  int n_load = 0, n_store = 0, n_call = 0, n_ret = 0, n_stack = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s instr=%h", what, instr);
    end
  endtask

  task automatic one(logic [31:0] i);
    bit ld, st, call, ret, sgn;
    int nb;
    logic [5:0] op;
    instr = i;
    #1;
    op = i[31:26];
    ld = op inside {6'd32, 6'd33, 6'd35, 6'd36, 6'd37};
    st = op inside {6'd40, 6'd41, 6'd43};
    call = (op == 6'd3) || (op == 6'd0 && i[5:0] == 6'd9);
    ret  = (op == 6'd0 && i[5:0] == 6'd8 && i[25:21] == 5'd31);
    sgn  = op inside {6'd32, 6'd33};
    nb   = (op inside {6'd32, 6'd36, 6'd40}) ? 1 : (op inside {6'd33, 6'd37, 6'd41}) ? 2 : 4;
    check(dec.is_load == ld, "is_load");
    check(dec.is_store == st, "is_store");
    check(dec.is_call == call, "is_call");
    check(dec.is_return == ret, "is_return");
    check(dec.base_reg == i[25:21], "base_reg");
    check(dec.disp == i[15:0], "disp");
    if (ld) check(dec.sign_ext == sgn, "sign_ext");
    if (ld || st) begin
      check(int'(dec.size) + 1 == nb, "size");
      check(dec.is_stack == (i[25:21] == 5'd29 || i[25:21] == 5'd30), "is_stack");
    end else check(!dec.is_stack, "no stack flag");
    n_load += ld; n_store += st; n_call += call; n_ret += ret; n_stack += dec.is_stack;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] ops[] = '{6'd32, 6'd33, 6'd35, 6'd36, 6'd37, 6'd40, 6'd41, 6'd43, 6'd3, 6'd0, 6'd8, 6'd15};
    one(32'h8fbf_0014);   // lw  $ra, 20($sp)
    one(32'hafb0_0010);   // sw  $s0, 16($sp)
    one(32'h0c00_0040);   // jal
    one(32'h03e0_0008);   // jr  $ra
    one(32'h0320_f809);   // jalr $t9
    one(32'h0200_0008);   // jr $s0 (not a return)
    one(32'h8f82_8010);   // lw $v0, -32752($gp)
    for (int k = 0; k < 3000; k++) begin
      automatic logic [31:0] r = $urandom;
      r[31:26] = ops[$urandom_range(0, ops.size() - 1)];
      if (r[31:26] == 6'd0) begin
        r[5:0] = ($urandom_range(0, 1) != 0) ? 6'd8 : 6'd9;
        if ($urandom_range(0, 1) != 0) r[25:21] = 5'd31;
      end
      if ($urandom_range(0, 2) == 0) r[25:21] = ($urandom_range(0, 1) != 0) ? 5'd29 : 5'd30;
      one(r);
    end
    check(n_load > 0 && n_store > 0 && n_call > 0 && n_ret > 0 && n_stack > 0, "all classes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
