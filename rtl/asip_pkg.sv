// asip_pkg: types, constants and instruction encoders shared by the
// dual-issue VLIW-SIMD audio processor.
//
// A bundle is 64 bits: slot 0 in bits [31:0], slot 1 in bits [63:32]. Every
// slot instruction is 32 bits. The document fixes the dual 32-bit issue, the
// 64-bit SIMD registers with 8/16/32/64-bit subwords, the X2 flag, the
// condition-select / set-flags (CS) / conditional (CR) scheme, MAC_16, the
// complex multiply, CLZ, post-incremented address pointers with circular
// wrap and the delayed co-processor loads and stores. The bit layout, the
// opcode numbers and the special-register map below are this design's own.
//
// Formats (bit ranges of one 32-bit slot instruction):
//   all      [31:26] opcode
//   ALU      [25] X2  [24:23] size  [22] CS  [21] CR  [20] I
//            [19:14] rd  [13:8] ra  [7:2] rb  ([7:0] signed imm8 when I=1,
//            [0] selects the high twiddle for CMU)
//   MVI      [24:23] size  [19:14] rd  [13:0] signed imm14, one per subword
//   LDP/STP  [25] X2  [19:14] rd/rs  [10:8] pointer  [7] post-increment
//   LDA/STA  [25] X2  [19:14] rd/rs  [13:0] word address
//   LDCOP    [25:20] rd  [19:10] co-processor address
//   STCOP    [25:20] rs  [19:10] co-processor address  [5:0] iterations
//   SMVI     [21:16] special register  [15:0] imm16
//   BR       [25:20] ra  [19:18] condition  [11:0] target bundle
package asip_pkg;

  localparam int unsigned XLEN  = 64;   // SIMD register width
  localparam int unsigned NREG  = 64;   // two banks of 32 registers
  localparam int unsigned RAW   = 6;    // register address width
  localparam int unsigned AW    = 14;   // data word address width
  localparam int unsigned PCW   = 12;   // bundle address width
  localparam int unsigned NAPTR = 8;    // address pointers
  localparam int unsigned CAW   = 10;   // co-processor address width

  typedef logic [XLEN-1:0] word_t;

  // Subword size
  typedef enum logic [1:0] {SZ8 = 2'd0, SZ16 = 2'd1, SZ32 = 2'd2, SZ64 = 2'd3} size_e;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,
    OP_SUB   = 6'd2,
    OP_AND   = 6'd3,
    OP_OR    = 6'd4,
    OP_XOR   = 6'd5,
    OP_SHL   = 6'd6,
    OP_SHR   = 6'd7,
    OP_SRA   = 6'd8,
    OP_MIXL  = 6'd9,
    OP_MIXR  = 6'd10,
    OP_MIXRL = 6'd11,   // X2: lane 0 does MIXR, lane 1 does MIXL
    OP_MV    = 6'd12,
    OP_MVI   = 6'd13,
    OP_MAC16 = 6'd16,
    OP_CMU   = 6'd17,
    OP_CLZ   = 6'd18,
    OP_LDP   = 6'd24,
    OP_STP   = 6'd25,
    OP_LDA   = 6'd26,
    OP_STA   = 6'd27,
    OP_LDCOP = 6'd28,
    OP_STCOP = 6'd29,
    OP_SMVI  = 6'd30,
    OP_BR    = 6'd32,
    OP_HALT  = 6'd33
  } opcode_e;

  // ALU operations seen by simd_alu
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SHL, ALU_SHR, ALU_SRA, ALU_MIXL, ALU_MIXR, ALU_PASSB
  } alu_op_e;

  // Conditions selected by the CONDSEL special register
  typedef enum logic [2:0] {
    COND_ALWAYS = 3'd0, COND_ZERO = 3'd1, COND_NZERO = 3'd2, COND_NEG = 3'd3,
    COND_NNEG   = 3'd4, COND_CARRY = 3'd5, COND_NCARRY = 3'd6, COND_OVF = 3'd7
  } cond_e;

  // Branch conditions on the low 32 bits of ra
  typedef enum logic [1:0] {BR_ALWAYS = 2'd0, BR_ZERO = 2'd1, BR_NZERO = 2'd2} brcond_e;

  // Per byte lane flags; a subword's flags are copied to all its byte lanes
  typedef struct packed {
    logic z;
    logic n;
    logic c;
    logic v;
  } flags_t;
  typedef flags_t [7:0] flagvec_t;

  // Special registers written by SMVI
  localparam logic [5:0] SR_CONDSEL = 6'd0;
  localparam logic [5:0] SR_APTR0   = 6'd8;    // 8..15 address pointers
  localparam logic [5:0] SR_AMASK0  = 6'd16;   // 16..23 circular masks

  // Co-processor address map
  localparam logic [CAW-1:0] COP_DMA_EXT  = 10'h100;  // external word address
  localparam logic [CAW-1:0] COP_DMA_LOC  = 10'h101;  // data memory address
  localparam logic [CAW-1:0] COP_DMA_CTRL = 10'h102;  // [15:0] length, [16] dir; starts
  localparam logic [CAW-1:0] COP_DMA_STAT = 10'h103;  // load: bit 0 busy
  localparam logic [CAW-1:0] COP_DCU_A    = 10'h200;  // dividend; load: quotient
  localparam logic [CAW-1:0] COP_DCU_B    = 10'h201;  // divisor; starts
  localparam logic [CAW-1:0] COP_SQRT     = 10'h300;  // radicand, starts; load: root

  // Events reported by the core, one pulse per executed bundle
  typedef struct packed {
    logic bundle;     // a bundle executed
    logic x2;         // an X2 instruction executed
    logic cs;         // flags were stored
    logic cr;         // a conditional instruction executed
    logic mac;        // MAC_16 executed
    logic cmu;        // complex multiply executed
    logic clz;        // CLZ executed
    logic wrap;       // a circular pointer wrapped around
    logic branch;     // a branch was taken
    logic cop_start;  // a co-processor was started
  } events_t;

  // ---------------------------------------------------------------------
  // Encoders, used by test programs
  // ---------------------------------------------------------------------
  function automatic logic [31:0] enc_alu(opcode_e op, size_e sz, logic [5:0] rd,
                                          logic [5:0] ra, logic [5:0] rb,
                                          bit x2 = 0, bit cs = 0, bit cr = 0);
    return {op, x2, sz, cs, cr, 1'b0, rd, ra, rb, 2'b00};
  endfunction

  function automatic logic [31:0] enc_alui(opcode_e op, size_e sz, logic [5:0] rd,
                                           logic [5:0] ra, logic signed [7:0] imm,
                                           bit x2 = 0, bit cs = 0, bit cr = 0);
    return {op, x2, sz, cs, cr, 1'b1, rd, ra, imm};
  endfunction

  function automatic logic [31:0] enc_cmu(logic [5:0] rd, logic [5:0] ra, logic [5:0] rb,
                                          bit hi, bit x2 = 0);
    return {OP_CMU, x2, SZ32, 1'b0, 1'b0, 1'b0, rd, ra, rb, 1'b0, hi};
  endfunction

  function automatic logic [31:0] enc_mvi(size_e sz, logic [5:0] rd, logic signed [13:0] imm);
    return {OP_MVI, 1'b0, sz, 3'b000, rd, imm};
  endfunction

  function automatic logic [31:0] enc_ldp(logic [5:0] rd, logic [2:0] ap, bit inc, bit x2 = 0);
    return {OP_LDP, x2, 5'd0, rd, 3'd0, ap, inc, 7'd0};
  endfunction

  function automatic logic [31:0] enc_stp(logic [5:0] rs, logic [2:0] ap, bit inc, bit x2 = 0);
    return {OP_STP, x2, 5'd0, rs, 3'd0, ap, inc, 7'd0};
  endfunction

  function automatic logic [31:0] enc_lda(logic [5:0] rd, logic [AW-1:0] addr, bit x2 = 0);
    return {OP_LDA, x2, 5'd0, rd, addr};
  endfunction

  function automatic logic [31:0] enc_sta(logic [5:0] rs, logic [AW-1:0] addr, bit x2 = 0);
    return {OP_STA, x2, 5'd0, rs, addr};
  endfunction

  function automatic logic [31:0] enc_ldcop(logic [5:0] rd, logic [CAW-1:0] ca);
    return {OP_LDCOP, rd, ca, 10'd0};
  endfunction

  function automatic logic [31:0] enc_stcop(logic [CAW-1:0] ca, logic [5:0] rs, logic [5:0] iters);
    return {OP_STCOP, rs, ca, 4'd0, iters};
  endfunction

  function automatic logic [31:0] enc_smvi(logic [5:0] sr, logic [15:0] imm);
    return {OP_SMVI, 4'd0, sr, imm};
  endfunction

  function automatic logic [31:0] enc_br(brcond_e c, logic [5:0] ra, logic [PCW-1:0] target);
    return {OP_BR, ra, c, 6'd0, target};
  endfunction

  function automatic logic [31:0] enc_halt();
    return {OP_HALT, 26'd0};
  endfunction

  function automatic logic [31:0] enc_nop();
    return 32'd0;
  endfunction

  // Evaluate a CONDSEL condition on one set of flags
  function automatic logic cond_true(cond_e c, flags_t f);
    case (c)
      COND_ALWAYS: return 1'b1;
      COND_ZERO:   return f.z;
      COND_NZERO:  return !f.z;
      COND_NEG:    return f.n;
      COND_NNEG:   return !f.n;
      COND_CARRY:  return f.c;
      COND_NCARRY: return !f.c;
      COND_OVF:    return f.v;
      default:     return 1'b0;
    endcase
  endfunction

endpackage
