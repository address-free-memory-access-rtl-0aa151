// sc_inst_decode: front-end classification of one instruction word for the
// symbolic cache.
//
// The symbolic cache is read as soon as an instruction leaves the instruction
// cache, so this decoder looks only at the encoding bits: it tells loads and
// stores (with their access size and signedness), procedure calls (jal, jalr)
// and procedure returns (jr $ra), and hands out the base register ID and the
// 16-bit displacement of a memory instruction. A memory access whose base is
// $sp or $s8 is flagged as a stack access, the only kind that gets a P-color.
// Reading the base register and displacement fields, and the $sp/$s8 rule, follow
// the design; the MIPS32 field positions and opcode numbers are this
// implementation's choice of instruction set.
//
// Purely combinational: instr -> dec in the same cycle.
module sc_inst_decode
  import sc_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output dec_t               dec
);

  logic [5:0] opcode, funct;
  logic [REG_W-1:0] rs;

  always_comb begin
    opcode = instr[31:26];
    funct  = instr[5:0];
    rs     = instr[25:21];

    dec          = '0;
    dec.size     = SZ_WORD;
    dec.base_reg = rs;
    dec.disp     = instr[15:0];

    case (opcode)
      OP_LB:  begin dec.is_load  = 1'b1; dec.size = SZ_BYTE; dec.sign_ext = 1'b1; end
      OP_LBU: begin dec.is_load  = 1'b1; dec.size = SZ_BYTE; end
      OP_LH:  begin dec.is_load  = 1'b1; dec.size = SZ_HALF; dec.sign_ext = 1'b1; end
      OP_LHU: begin dec.is_load  = 1'b1; dec.size = SZ_HALF; end
      OP_LW:  begin dec.is_load  = 1'b1; dec.size = SZ_WORD; end
      OP_SB:  begin dec.is_store = 1'b1; dec.size = SZ_BYTE; end
      OP_SH:  begin dec.is_store = 1'b1; dec.size = SZ_HALF; end
      OP_SW:  begin dec.is_store = 1'b1; dec.size = SZ_WORD; end
      OP_JAL: dec.is_call = 1'b1;
      OP_SPECIAL: begin
        if (funct == FN_JALR) dec.is_call = 1'b1;
        if (funct == FN_JR && rs == REG_RA) dec.is_return = 1'b1;
      end
      default: ;
    endcase

    dec.is_stack = (dec.is_load || dec.is_store) && (rs == REG_SP || rs == REG_S8);
  end

endmodule
