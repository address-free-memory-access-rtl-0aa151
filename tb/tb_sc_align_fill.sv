// tb_sc_align_fill: checks the realignment of an L1 line into the symbolic
// line. First the eight-unit example (symbolic unit 010, real unit 101: SC
// units 0..4 get L1 units 3..7, units 5..7 stay invalid), then random offsets
// for word units (default) and for byte units.
module tb_sc_align_fill;
  logic [255:0] l1_8;  logic [4:0] roff8, soff8;  logic [255:0] fl8;  logic [7:0]  fv8;
  logic [511:0] l1;    logic [5:0] roff, soff;    logic [511:0] flw;  logic [15:0] fvw;
  logic [511:0] flb;   logic [63:0] fvb;

  sc_align_fill #(.LINE_BYTES(32), .UNIT_BYTES(4)) u8 (.l1_line(l1_8), .real_off(roff8), .sym_off(soff8), .fill_line(fl8), .fill_valid(fv8));
  sc_align_fill u_word (.l1_line(l1), .real_off(roff), .sym_off(soff), .fill_line(flw), .fill_valid(fvw));
  sc_align_fill #(.LINE_BYTES(64), .UNIT_BYTES(1)) u_byte (.l1_line(l1), .real_off(roff), .sym_off(soff), .fill_line(flb), .fill_valid(fvb));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s roff=%0d soff=%0d", what, roff, soff);
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
    // Figure-style example: 8 units of 4 bytes
    for (int u = 0; u < 8; u++) l1_8[u*32 +: 32] = 32'hA0 + u;
    roff8 = 5'b10100; soff8 = 5'b01000;
    roff = '0; soff = '0; l1 = '0;
    #1;
    check(fv8 == 8'b0001_1111, "example valid mask");
    for (int u = 0; u < 5; u++) check(fl8[u*32 +: 32] == 32'hA0 + u + 3, "example data");
    for (int k = 0; k < 2000; k++) begin
      for (int w = 0; w < 16; w++) l1[w*32 +: 32] = $urandom;
      roff = 6'($urandom); soff = 6'($urandom);
      #1;
      for (int u = 0; u < 16; u++) begin
        automatic int src = u - int'(soff / 4) + int'(roff / 4);
        automatic bit v = src >= 0 && src < 16;
        check(fvw[u] == v, "word valid");
        if (v) check(flw[u*32 +: 32] == l1[src*32 +: 32], "word data");
      end
      for (int b = 0; b < 64; b++) begin
        automatic int src = b - int'(soff) + int'(roff);
        automatic bit v = src >= 0 && src < 64;
        check(fvb[b] == v, "byte valid");
        if (v) check(flb[b*8 +: 8] == l1[src*8 +: 8], "byte data");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
