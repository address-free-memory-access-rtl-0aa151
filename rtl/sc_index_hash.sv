// sc_index_hash: set index of the symbolic cache, with index randomization.
//
// Displacements are mostly zero or small constants, so the address bits just
// above the line offset are a poor set index. With RANDOMIZE = 1 each index bit
// i is the exclusive-OR of symbolic address bit OFF_W+i (displacement) with bit
// 16+i (the base register ID, then the P-color). For the 64-set example of the
// design this XORs bits 6..11 with bits 16..21; for the default 16-set,
// 64-byte-line cache it XORs bits 6..9 with bits 16..19. Bits above the top of
// the symbolic address count as zero. RANDOMIZE = 0 gives the plain index.
//
// The tag is the part of the symbolic address above the index bits. Because
// the XOR partners (bits 16 and up) are kept in the tag, the line address
// remains unique under randomization as long as OFF_W + IDX_W <= 16.
// Purely combinational.
module sc_index_hash
  import sc_pkg::*;
#(
  parameter int unsigned SYM_W     = 23,
  parameter int unsigned OFF_W     = 6,
  parameter int unsigned IDX_W     = 4,
  parameter bit          RANDOMIZE = 1'b1,
  localparam int unsigned TAG_W    = SYM_W - OFF_W - IDX_W
) (
  input  logic [SYM_W-1:0] sym_addr,
  output logic [IDX_W-1:0] index,
  output logic [TAG_W-1:0] tag
);

  // symbolic address zero-extended so that bits 16+i always exist
  logic [SYM_W+IDX_W-1:0] padded;
  assign padded = {{IDX_W{1'b0}}, sym_addr};

  always_comb begin
    for (int i = 0; i < IDX_W; i++)
      index[i] = padded[OFF_W + i] ^ (RANDOMIZE & padded[DISP_W + i]);
  end

  assign tag = sym_addr[SYM_W-1 -: TAG_W];

endmodule
