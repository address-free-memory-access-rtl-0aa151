// sc_pkg: shared constants and types of the symbolic-cache load value predictor.
//
// The symbolic address is built from the encoding bits of a MIPS-style I-type
// memory instruction: the 16-bit displacement occupies bits [15:0], the 5-bit
// base register ID bits [20:16], and for stack accesses the procedure colour
// (P-color) is concatenated above the register ID. Those positions follow the
// described design. The MIPS32 opcode numbering used by the decoder, the
// little-endian packing of bytes into the 32-bit data port and the choice of
// $sp (r29) and $s8/$fp (r30) as the stack base registers by number are this
// implementation's choices (the register names themselves follow the design).
package sc_pkg;

  localparam int unsigned INSTR_W = 32;   // instruction word
  localparam int unsigned ADDR_W  = 32;   // real (virtual) data address
  localparam int unsigned DATA_W  = 32;   // widest load/store value
  localparam int unsigned DISP_W  = 16;   // displacement field
  localparam int unsigned REG_W   = 5;    // base register ID field
  localparam int unsigned SYM_BASE_W = DISP_W + REG_W;  // 21-bit symbolic address without P-color

  localparam logic [REG_W-1:0] REG_SP = 5'd29;  // $sp
  localparam logic [REG_W-1:0] REG_S8 = 5'd30;  // $s8 / $fp
  localparam logic [REG_W-1:0] REG_RA = 5'd31;  // $ra

  // MIPS32 primary opcodes of interest
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00,
    OP_JAL     = 6'h03,
    OP_LB      = 6'h20,
    OP_LH      = 6'h21,
    OP_LW      = 6'h23,
    OP_LBU     = 6'h24,
    OP_LHU     = 6'h25,
    OP_SB      = 6'h28,
    OP_SH      = 6'h29,
    OP_SW      = 6'h2B
  } opcode_e;

  // SPECIAL function codes
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;

  // Access size in bytes - 1 (0: byte, 1: half-word, 3: word)
  typedef enum logic [1:0] {
    SZ_BYTE = 2'd0,
    SZ_HALF = 2'd1,
    SZ_WORD = 2'd3
  } mem_size_e;

  // Number of bytes of an access
  function automatic int unsigned size_bytes(mem_size_e s);
    return int'(s) + 1;
  endfunction

  // Byte-enable mask of the low bytes of the data port for an access size
  function automatic logic [DATA_W/8-1:0] size_mask(mem_size_e s);
    case (s)
      SZ_BYTE: return 4'b0001;
      SZ_HALF: return 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  // Result of decoding one instruction word
  typedef struct packed {
    logic             is_load;
    logic             is_store;
    logic             is_call;     // jal / jalr
    logic             is_return;   // jr $ra
    logic             is_stack;    // memory access based on $sp or $s8
    logic             sign_ext;    // lb / lh
    mem_size_e        size;
    logic [REG_W-1:0] base_reg;
    logic [DISP_W-1:0] disp;
  } dec_t;

endpackage
