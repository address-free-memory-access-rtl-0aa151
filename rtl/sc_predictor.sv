// sc_predictor: load value speculation with a symbolic cache.
//
// Loads are predicted from the instruction encoding alone, so the value is
// available in the front end of the pipeline, before register read, address
// generation and the data cache access ("zero-cycle load"). The design has
// two halves:
//
//  Front end (fetch order). Every fetched instruction word goes through
//  sc_inst_decode. Calls (jal, jalr) and returns (jr $ra) step the P-color
//  counter. A load or store gets its symbolic address from sym_addr_gen
//  (displacement, base register ID, and the P-color if the base is $sp or
//  $s8). A load also looks the symbolic cache up. One cycle after f_valid the
//  p_* outputs present the memory instruction's symbolic address, size and,
//  for a load, p_hit and the speculative value: p_data holds the raw bytes
//  (little-endian, zero above the size) and p_value the register value after
//  sign or zero extension. The pipeline carries p_sym, p_size and the
//  prediction along with the instruction.
//
//  Back end (execution order). When a load or store has executed, r_valid
//  presents its symbolic address, its real address, the L1 line holding that
//  address, and the real data (store data or the loaded bytes). The symbolic
//  cache fills a missing line from the realigned L1 line and writes the data
//  at the symbolic position. For a load, r_pred_hit/r_pred_data (the
//  prediction carried along) are compared with the real bytes in the same
//  cycle: r_correct or r_mispredict says whether the speculation was right,
//  so the pipeline can keep or squash the dependents.
//
// The front/back-end split, symbolic addressing, P-color, index randomization
// and realigned partial fill follow the design, with its main configuration as
// the default: 4 KB, 4-way, 64-byte lines, word alignment, 2-bit P-color,
// randomized index. The MIPS32 encoding, the one-cycle lookup, the carried
// prediction and the verification compare are this implementation's choices.
// The processor pipeline and the L1 cache are outside this block: their
// signals are the ports. Instructions are assumed to arrive on the correct path
// (no P-color repair after a mispredicted branch).
module sc_predictor
  import sc_pkg::*;
#(
  parameter int unsigned PCOLOR_BITS = 2,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned SETS        = 16,
  parameter int unsigned UNIT_BYTES  = 4,
  parameter bit          RANDOMIZE   = 1'b1,
  localparam int unsigned SYM_W = SYM_BASE_W + PCOLOR_BITS,
  localparam int unsigned PC_W  = (PCOLOR_BITS > 0) ? PCOLOR_BITS : 1,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned LBITS = LINE_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // front end: fetched instruction stream
  input  logic              f_valid,
  input  logic [INSTR_W-1:0] f_instr,
  // front end: prediction, one cycle after f_valid
  output logic              p_valid,      // a load or store was fetched
  output logic              p_is_load,
  output logic              p_is_store,
  output logic [SYM_W-1:0]  p_sym,
  output mem_size_e         p_size,
  output logic              p_hit,        // speculative value available
  output logic [DATA_W-1:0] p_data,       // raw bytes
  output logic [DATA_W-1:0] p_value,      // sign/zero extended load value
  output logic [PC_W-1:0]   pcolor,       // current procedure colour
  // back end: executed load or store
  input  logic              r_valid,
  input  logic              r_is_load,
  input  logic [SYM_W-1:0]  r_sym,
  input  mem_size_e         r_size,
  input  logic [ADDR_W-1:0] r_addr,
  input  logic [LBITS-1:0]  r_l1_line,
  input  logic [DATA_W-1:0] r_data,
  input  logic              r_pred_hit,
  input  logic [DATA_W-1:0] r_pred_data,
  // back end: verdict on the speculation of the load (combinational)
  output logic              r_correct,
  output logic              r_mispredict,
  output logic              r_fill        // the access brought L1 data into the SC
);

  // ------------------------------------------------------------ front end
  dec_t dec;
  sc_inst_decode u_dec (.instr(f_instr), .dec(dec));

  logic [PC_W-1:0] pcolor_c;
  if (PCOLOR_BITS > 0) begin : g_pcolor
    pcolor_counter #(.PCOLOR_BITS(PCOLOR_BITS)) u_pcolor (
      .clk, .rst_n,
      .call (f_valid && dec.is_call),
      .ret  (f_valid && dec.is_return),
      .pcolor(pcolor_c));
  end else begin : g_no_pcolor
    assign pcolor_c = '0;
  end
  assign pcolor = pcolor_c;

  logic [SYM_W-1:0] f_sym;
  sym_addr_gen #(.PCOLOR_BITS(PCOLOR_BITS)) u_sym (
    .disp(dec.disp), .base_reg(dec.base_reg), .is_stack(dec.is_stack),
    .pcolor(pcolor_c), .sym_addr(f_sym));

  logic              lk_resp_valid, lk_hit;
  logic [DATA_W-1:0] lk_data;
  logic              up_tag_hit, up_alloc;

  symbolic_cache #(
    .PCOLOR_BITS(PCOLOR_BITS), .LINE_BYTES(LINE_BYTES), .WAYS(WAYS),
    .SETS(SETS), .UNIT_BYTES(UNIT_BYTES), .RANDOMIZE(RANDOMIZE)
  ) u_sc (
    .clk, .rst_n,
    .lk_valid     (f_valid && dec.is_load),
    .lk_sym       (f_sym),
    .lk_size      (dec.size),
    .lk_resp_valid(lk_resp_valid),
    .lk_hit       (lk_hit),
    .lk_data      (lk_data),
    .up_valid     (r_valid),
    .up_sym       (r_sym),
    .up_size      (r_size),
    .up_real_off  (r_addr[OFF_W-1:0]),
    .up_l1_line   (r_l1_line),
    .up_data      (r_data),
    .up_tag_hit   (up_tag_hit),
    .up_alloc     (up_alloc),
    .up_fill      (r_fill));

  logic sign_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid    <= 1'b0;
      p_is_load  <= 1'b0;
      p_is_store <= 1'b0;
      p_sym      <= '0;
      p_size     <= SZ_WORD;
      sign_q     <= 1'b0;
    end else begin
      p_valid    <= f_valid && (dec.is_load || dec.is_store);
      p_is_load  <= f_valid && dec.is_load;
      p_is_store <= f_valid && dec.is_store;
      p_sym      <= f_sym;
      p_size     <= dec.size;
      sign_q     <= dec.sign_ext;
    end
  end

  assign p_hit  = lk_resp_valid && lk_hit;
  assign p_data = lk_data;

  always_comb begin
    case (p_size)
      SZ_BYTE: p_value = sign_q ? {{24{lk_data[7]}}, lk_data[7:0]}   : {24'b0, lk_data[7:0]};
      SZ_HALF: p_value = sign_q ? {{16{lk_data[15]}}, lk_data[15:0]} : {16'b0, lk_data[15:0]};
      default: p_value = lk_data;
    endcase
  end

  // ------------------------------------------------------------ back end
  logic [DATA_W-1:0] vmask;
  always_comb begin
    for (int k = 0; k < DATA_W / 8; k++)
      vmask[k*8 +: 8] = {8{size_mask(r_size)[k]}};
  end

  assign r_correct    = r_valid && r_is_load && r_pred_hit && ((r_pred_data & vmask) == (r_data & vmask));
  assign r_mispredict = r_valid && r_is_load && r_pred_hit && !r_correct;

  // a verdict is given only for an executed load, and never both ways
  a_verdict_excl: assert property (@(posedge clk) disable iff (!rst_n) !(r_correct && r_mispredict));
  a_verdict_load: assert property (@(posedge clk) disable iff (!rst_n) (r_correct || r_mispredict) |-> (r_valid && r_is_load));

  logic unused;
  assign unused = ^{up_tag_hit, up_alloc, r_addr[ADDR_W-1:OFF_W]};

endmodule
