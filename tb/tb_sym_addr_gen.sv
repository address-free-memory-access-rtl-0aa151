// tb_sym_addr_gen: random displacement / base register / colour inputs; the
// symbolic address must be {colour if stack access, register ID, displacement}
// computed here with shifts and adds.
module tb_sym_addr_gen;
  logic [15:0] disp;
  logic [4:0]  base_reg;
  logic        is_stack;
  logic [1:0]  pcolor;
  logic [22:0] sym_addr;

  sym_addr_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    for (int k = 0; k < 4000; k++) begin
      disp = 16'($urandom); base_reg = 5'($urandom); is_stack = 1'($urandom); pcolor = 2'($urandom);
      if (k < 4) begin disp = 16'h0014; base_reg = 5'd29; is_stack = 1'b1; pcolor = 2'(k); end
      #1;
      exp = int'(disp) + int'(base_reg) * 65536 + (is_stack ? int'(pcolor) * 2097152 : 0);
      checks++;
      if (int'(sym_addr) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sym=%h exp=%h", sym_addr, exp);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
