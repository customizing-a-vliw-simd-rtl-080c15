// simd_alu: 64-bit SIMD arithmetic/logic unit with subword parallelism,
// flag generation and conditional per-subword execution.
//
// The 64-bit operands are split into eight 8-bit, four 16-bit, two 32-bit or
// one 64-bit subword (size input) and the same operation runs on every
// subword. Add and subtract use one byte-wide carry chain that is cut at
// subword boundaries. For each subword the unit computes zero, negative,
// carry and overflow flags and copies them to every byte lane of that
// subword (flags_o); the core stores them when an instruction has its CS bit
// set. When cr_i is set, each subword of the result is taken only where the
// condition cond_i holds on the stored flags flags_i, otherwise the old
// destination value old_i is kept. That is the document's CS/CR scheme, which
// turns short if-statements into data dependencies.
//
// MIXL/MIXR reorder subwords of two registers: for every pair of subwords,
// MIXL keeps the left (upper) elements, a's in the upper and b's in the lower
// position, MIXR does the same with the right (lower) elements. Shifts take
// their count from the low bits of each b subword. The operation set, the
// flag definitions (carry = no borrow on subtract) and the MIX convention are
// this design's choices; the document names the mechanisms only.
//
// Purely combinational.
module simd_alu
  import asip_pkg::*;
(
  input  alu_op_e  op_i,
  input  size_e    size_i,
  input  word_t    a_i,
  input  word_t    b_i,
  input  word_t    old_i,     // current destination value, kept where the condition fails
  input  logic     cr_i,      // conditional execution
  input  cond_e    cond_i,    // condition selected by CONDSEL
  input  flagvec_t flags_i,   // stored flags
  output word_t    res_o,
  output flagvec_t flags_o
);

  // byte lane i starts a subword of the given size
  function automatic logic starts(size_e s, int i);
    case (s)
      SZ8:     return 1'b1;
      SZ16:    return (i % 2) == 0;
      SZ32:    return (i % 4) == 0;
      default: return i == 0;
    endcase
  endfunction

  // byte lane i ends a subword
  function automatic logic ends(size_e s, int i);
    case (s)
      SZ8:     return 1'b1;
      SZ16:    return (i % 2) == 1;
      SZ32:    return (i % 4) == 3;
      default: return i == 7;
    endcase
  endfunction

  function automatic int unsigned lanes_per_sw(size_e s);
    case (s)
      SZ8:     return 1;
      SZ16:    return 2;
      SZ32:    return 4;
      default: return 8;
    endcase
  endfunction

  word_t    raw;        // unconditional result
  logic [7:0] cout;     // carry out of each byte
  logic [7:0] cin7;     // carry into bit 7 of each byte

  // ---------------- add / subtract with cut carry chain
  always_comb begin
    logic       c;
    logic [8:0] s;
    logic [7:0] bb;
    c    = 1'b0;
    raw  = '0;
    cout = '0;
    cin7 = '0;
    for (int i = 0; i < 8; i++) begin
      if (starts(size_i, i)) c = (op_i == ALU_SUB);
      bb  = (op_i == ALU_SUB) ? ~b_i[8*i +: 8] : b_i[8*i +: 8];
      s   = {1'b0, a_i[8*i +: 8]} + {1'b0, bb} + {8'd0, c};
      // carry into the sign bit: sum bit 7 = a7 ^ b7 ^ carry-in
      cin7[i] = s[7] ^ a_i[8*i+7] ^ bb[7];
      raw[8*i +: 8] = s[7:0];
      cout[i] = s[8];
      c = s[8];
    end
    unique case (op_i)
      ALU_ADD, ALU_SUB: ;  // computed above
      ALU_AND:   raw = a_i & b_i;
      ALU_OR:    raw = a_i | b_i;
      ALU_XOR:   raw = a_i ^ b_i;
      ALU_PASSB: raw = b_i;
      ALU_SHL, ALU_SHR, ALU_SRA: begin
        unique case (size_i)
          SZ8: for (int k = 0; k < 8; k++)
            raw[8*k +: 8] = (op_i == ALU_SHL) ? a_i[8*k +: 8] << b_i[8*k +: 3] :
                            (op_i == ALU_SHR) ? a_i[8*k +: 8] >> b_i[8*k +: 3] :
                            8'($signed(a_i[8*k +: 8]) >>> b_i[8*k +: 3]);
          SZ16: for (int k = 0; k < 4; k++)
            raw[16*k +: 16] = (op_i == ALU_SHL) ? a_i[16*k +: 16] << b_i[16*k +: 4] :
                              (op_i == ALU_SHR) ? a_i[16*k +: 16] >> b_i[16*k +: 4] :
                              16'($signed(a_i[16*k +: 16]) >>> b_i[16*k +: 4]);
          SZ32: for (int k = 0; k < 2; k++)
            raw[32*k +: 32] = (op_i == ALU_SHL) ? a_i[32*k +: 32] << b_i[32*k +: 5] :
                              (op_i == ALU_SHR) ? a_i[32*k +: 32] >> b_i[32*k +: 5] :
                              32'($signed(a_i[32*k +: 32]) >>> b_i[32*k +: 5]);
          default:
            raw = (op_i == ALU_SHL) ? a_i << b_i[5:0] :
                  (op_i == ALU_SHR) ? a_i >> b_i[5:0] :
                  64'($signed(a_i) >>> b_i[5:0]);
        endcase
      end
      ALU_MIXL, ALU_MIXR: begin
        unique case (size_i)
          SZ8: for (int j = 0; j < 4; j++) begin
            raw[16*j+8 +: 8] = (op_i == ALU_MIXL) ? a_i[16*j+8 +: 8] : a_i[16*j +: 8];
            raw[16*j   +: 8] = (op_i == ALU_MIXL) ? b_i[16*j+8 +: 8] : b_i[16*j +: 8];
          end
          SZ16: for (int j = 0; j < 2; j++) begin
            raw[32*j+16 +: 16] = (op_i == ALU_MIXL) ? a_i[32*j+16 +: 16] : a_i[32*j +: 16];
            raw[32*j    +: 16] = (op_i == ALU_MIXL) ? b_i[32*j+16 +: 16] : b_i[32*j +: 16];
          end
          default: begin
            raw[63:32] = (op_i == ALU_MIXL) ? a_i[63:32] : a_i[31:0];
            raw[31:0]  = (op_i == ALU_MIXL) ? b_i[63:32] : b_i[31:0];
          end
        endcase
      end
      default: raw = '0;
    endcase
  end

  // ---------------- flags per subword, copied to its byte lanes
  always_comb begin
    logic   zacc;
    flags_t f;
    int unsigned n;
    int unsigned first;
    flags_o = '0;
    n = lanes_per_sw(size_i);
    zacc = 1'b1;
    for (int i = 0; i < 8; i++) begin
      if (starts(size_i, i)) zacc = 1'b1;
      zacc = zacc & (raw[8*i +: 8] == 8'd0);
      if (ends(size_i, i)) begin
        f.z = zacc;
        f.n = raw[8*i+7];
        if (op_i == ALU_ADD || op_i == ALU_SUB) begin
          f.c = cout[i];
          f.v = cout[i] ^ cin7[i];
        end else begin
          f.c = 1'b0;
          f.v = 1'b0;
        end
        first = i + 1 - n;
        for (int k = 0; k < 8; k++)
          if (k >= first && k <= i) flags_o[k] = f;
      end
    end
  end

  // ---------------- conditional merge: per byte lane, condition of its subword
  always_comb begin
    for (int i = 0; i < 8; i++)
      res_o[8*i +: 8] = (!cr_i || cond_true(cond_i, flags_i[i])) ? raw[8*i +: 8] : old_i[8*i +: 8];
  end

endmodule
