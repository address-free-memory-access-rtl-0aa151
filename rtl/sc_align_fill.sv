// sc_align_fill: lays an L1 line out in symbolic-line order on a miss.
//
// The offset of the target data inside its real (L1) line generally differs
// from its offset inside the symbolic line. On a miss the target unit is placed
// at the unit selected by the symbolic offset, and the other units of the L1
// line keep their distance to it: SC unit j receives L1 unit j - su + ru, where
// su and ru are the symbolic and the real unit index. Units that would fall
// outside the symbolic line are dropped and SC units with no source stay
// invalid (partial line fill). This rule, the partial fill and the choice of
// alignment granularity follow the design. UNIT_BYTES = 4 is word alignment
// (the design's main configuration); 1 is byte alignment. The L1 line is taken
// to be as long as the symbolic line, which is this implementation's choice.
//
// Interface: l1_line is byte b at bits [8b+7:8b]; real_off and sym_off are byte
// offsets within the line (their bits below the unit size are ignored).
// fill_line/fill_valid give the realigned data and one valid bit per unit.
// Purely combinational.
module sc_align_fill #(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned UNIT_BYTES = 4,
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned NUNITS = LINE_BYTES / UNIT_BYTES,
  localparam int unsigned UBITS  = UNIT_BYTES * 8
) (
  input  logic [LINE_BYTES*8-1:0] l1_line,
  input  logic [OFF_W-1:0]        real_off,
  input  logic [OFF_W-1:0]        sym_off,
  output logic [LINE_BYTES*8-1:0] fill_line,
  output logic [NUNITS-1:0]       fill_valid
);

  localparam int unsigned UOFF_W = $clog2(UNIT_BYTES);

  int ru, su, src;

  always_comb begin
    ru = int'(real_off) >> UOFF_W;
    su = int'(sym_off) >> UOFF_W;
    fill_line  = '0;
    fill_valid = '0;
    for (int j = 0; j < NUNITS; j++) begin
      src = j - su + ru;
      if (src >= 0 && src < NUNITS) begin
        fill_line[j*UBITS +: UBITS] = l1_line[src*UBITS +: UBITS];
        fill_valid[j] = 1'b1;
      end
    end
  end

endmodule
