// tb_sc_index_hash: checks index randomization in two shapes: the 64-set,
// 64-byte-line example (index = bits 11:6 XOR bits 21:16 of the symbolic
// address) and the default 16-set cache (bits 9:6 XOR bits 19:16), plus the
// plain index with randomization off. Expected values are written out bit by
// bit here.
module tb_sc_index_hash;
  logic [22:0] sym;
  logic [5:0]  idx64;  logic [10:0] tag64;
  logic [3:0]  idx16;  logic [12:0] tag16;
  logic [3:0]  idxp;   logic [12:0] tagp;

  sc_index_hash #(.SYM_W(23), .OFF_W(6), .IDX_W(6), .RANDOMIZE(1)) u64 (.sym_addr(sym), .index(idx64), .tag(tag64));
  sc_index_hash #(.SYM_W(23), .OFF_W(6), .IDX_W(4), .RANDOMIZE(1)) u16 (.sym_addr(sym), .index(idx16), .tag(tag16));
  sc_index_hash #(.SYM_W(23), .OFF_W(6), .IDX_W(4), .RANDOMIZE(0)) up  (.sym_addr(sym), .index(idxp),  .tag(tagp));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s sym=%h", what, sym);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      sym = 23'($urandom);
      if (k == 0) sym = {2'd1, 5'd29, 16'h0000};  // displacement 0: index from register and colour
      #1;
      check(idx64 == {sym[11]^sym[21], sym[10]^sym[20], sym[9]^sym[19], sym[8]^sym[18], sym[7]^sym[17], sym[6]^sym[16]}, "idx64");
      check(tag64 == sym[22:12], "tag64");
      check(idx16 == {sym[9]^sym[19], sym[8]^sym[18], sym[7]^sym[17], sym[6]^sym[16]}, "idx16");
      check(tag16 == sym[22:10], "tag16");
      check(idxp == sym[9:6] && tagp == sym[22:10], "plain");
      if (k == 0) check(idx64 == 6'b111101, "example: $sp colour 1, disp 0");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
