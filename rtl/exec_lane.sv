// exec_lane: one execution lane of an issue slot.
//
// Each issue slot of the vector unit has two lanes. Lane 0 executes every
// ALU-type instruction; lane 1 executes the second half of an X2
// instruction, the same opcode on the registers whose last address bit is
// flipped. A lane holds the SIMD ALU, the MAC_16 unit, the complex multiply
// unit and the CLZ unit, so with two slots up to four operations complete
// per cycle, which is how an X2 schedule reaches an IPC above two.
//
// The lane turns the decoded opcode into an ALU operation, forms the second
// operand (register, or the sign-extended 8-bit immediate copied into every
// subword, or the MVI immediate), and selects the unit whose result is
// written. For MAC_16 the lane also returns the upper accumulator (acc_hi_o)
// that goes to the partner register. For MIXRL, lane 0 does MIXR and lane 1
// MIXL, the merged pair the document shows for FFT reordering.
//
// Purely combinational.
module exec_lane
  import asip_pkg::*;
(
  input  logic        lane1_i,     // this is lane 1 of its slot
  input  opcode_e     op_i,
  input  size_e       size_i,
  input  logic        cr_i,
  input  logic        imm_en_i,
  input  logic [7:0]  imm8_i,
  input  logic [13:0] imm14_i,
  input  logic        cmu_hi_i,
  input  word_t       a_i,
  input  word_t       b_i,
  input  word_t       old_i,       // destination register
  input  word_t       old_hi_i,    // partner of the destination (MAC_16 upper accumulator)
  input  cond_e       cond_i,
  input  flagvec_t    flags_i,
  output logic        we_o,
  output word_t       res_o,
  output word_t       acc_hi_o,
  output flagvec_t    flags_o
);

  function automatic word_t bcast(size_e s, logic [63:0] v);
    word_t r;
    r = '0;
    unique case (s)
      SZ8:     for (int k = 0; k < 8; k++) r[8*k +: 8]   = v[7:0];
      SZ16:    for (int k = 0; k < 4; k++) r[16*k +: 16] = v[15:0];
      SZ32:    for (int k = 0; k < 2; k++) r[32*k +: 32] = v[31:0];
      default: r = v;
    endcase
    return r;
  endfunction

  alu_op_e alu_op;
  word_t   alu_b, alu_res, mac_lo, mac_hi, cmu_res, clz_res;
  logic    is_alu;

  always_comb begin
    is_alu = 1'b1;
    alu_op = ALU_PASSB;
    alu_b  = imm_en_i ? bcast(size_i, 64'(signed'(imm8_i))) : b_i;
    unique case (op_i)
      OP_ADD:   alu_op = ALU_ADD;
      OP_SUB:   alu_op = ALU_SUB;
      OP_AND:   alu_op = ALU_AND;
      OP_OR:    alu_op = ALU_OR;
      OP_XOR:   alu_op = ALU_XOR;
      OP_SHL:   alu_op = ALU_SHL;
      OP_SHR:   alu_op = ALU_SHR;
      OP_SRA:   alu_op = ALU_SRA;
      OP_MIXL:  alu_op = ALU_MIXL;
      OP_MIXR:  alu_op = ALU_MIXR;
      OP_MIXRL: alu_op = lane1_i ? ALU_MIXL : ALU_MIXR;
      OP_MV:    alu_b  = a_i;
      OP_MVI:   alu_b  = bcast(size_i, 64'(signed'(imm14_i)));
      default:  is_alu = 1'b0;
    endcase
  end

  simd_alu u_alu (
    .op_i    (alu_op),
    .size_i  (size_i),
    .a_i     (a_i),
    .b_i     (alu_b),
    .old_i   (old_i),
    .cr_i    (cr_i),
    .cond_i  (cond_i),
    .flags_i (flags_i),
    .res_o   (alu_res),
    .flags_o (flags_o)
  );

  mac16 u_mac (
    .a_i      (a_i),
    .b_i      (b_i),
    .acc_lo_i (old_i),
    .acc_hi_i (old_hi_i),
    .acc_lo_o (mac_lo),
    .acc_hi_o (mac_hi)
  );

  cmu u_cmu (
    .a_i  (a_i),
    .b_i  (b_i),
    .hi_i (cmu_hi_i),
    .c_o  (cmu_res)
  );

  clz_unit u_clz (
    .size_i (size_i),
    .a_i    (a_i),
    .res_o  (clz_res)
  );

  always_comb begin
    we_o     = 1'b1;
    acc_hi_o = mac_hi;
    if (is_alu)                res_o = alu_res;
    else if (op_i == OP_MAC16) res_o = mac_lo;
    else if (op_i == OP_CMU)   res_o = cmu_res;
    else if (op_i == OP_CLZ)   res_o = clz_res;
    else begin
      res_o = '0;
      we_o  = 1'b0;
    end
  end

endmodule
