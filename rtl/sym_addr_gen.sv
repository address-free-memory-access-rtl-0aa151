// sym_addr_gen: forms the symbolic address of a load or store.
//
// The symbolic address replaces the real memory address: its low 16 bits are
// the instruction's displacement, the 5-bit base register ID sits directly
// above it (bits 20:16), and for stack accesses (base $sp or $s8) the current
// P-color is concatenated above the register ID. Other accesses get a zero
// colour field, so globals and heap data stay shared between procedures. This
// layout follows the design. With PCOLOR_BITS = 0 the address is the plain
// 21-bit register-plus-displacement form.
//
// Interface: disp/base_reg/is_stack from the decoder, pcolor from the P-color
// counter; sym_addr is SYM_BASE_W + PCOLOR_BITS bits wide. Purely combinational.
module sym_addr_gen
  import sc_pkg::*;
#(
  parameter int unsigned PCOLOR_BITS = 2,
  localparam int unsigned PC_W  = (PCOLOR_BITS > 0) ? PCOLOR_BITS : 1,
  localparam int unsigned SYM_W = SYM_BASE_W + PCOLOR_BITS
) (
  input  logic [DISP_W-1:0] disp,
  input  logic [REG_W-1:0]  base_reg,
  input  logic              is_stack,
  input  logic [PC_W-1:0]   pcolor,
  output logic [SYM_W-1:0]  sym_addr
);

  logic [SYM_BASE_W-1:0] base_part;
  assign base_part = {base_reg, disp};

  if (PCOLOR_BITS > 0) begin : g_color
    assign sym_addr = {(is_stack ? pcolor : '0), base_part};
  end else begin : g_nocolor
    logic unused_color;
    assign unused_color = ^{is_stack, pcolor};
    assign sym_addr = base_part;
  end

endmodule
