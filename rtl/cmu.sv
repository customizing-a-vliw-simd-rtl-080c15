// cmu: complex multiplication unit for the FFT butterflies.
//
// Operand A is one complex value with 32-bit parts, [A_re | A_im] (real part
// in bits 63:32). Operand B holds two complex twiddle factors with 16-bit
// parts, [B_re,hi | B_im,hi | B_re,lo | B_im,lo], so that one load brings in
// two twiddles; hi_i selects which of the two is used. The result is
//   C = [A_re*B_re - A_im*B_im | A_re*B_im + A_im*B_re]
// with 32-bit parts, computed in one cycle. That is the document's equation.
// The twiddles are taken as Q1.15 fractions, so the 48-bit products are
// summed exactly and shifted right by FRAC (arithmetic, truncating) and the
// low 32 bits kept; the document does not give this scaling, it is this
// design's choice.
//
// Purely combinational.
module cmu
  import asip_pkg::*;
#(
  parameter int unsigned FRAC = 15   // fraction bits of the twiddle format
) (
  input  word_t a_i,
  input  word_t b_i,
  input  logic  hi_i,
  output word_t c_o
);

  logic signed [31:0] are, aim;
  logic signed [15:0] bre, bim;
  logic signed [48:0] pre, pim;

  always_comb begin
    are = a_i[63:32];
    aim = a_i[31:0];
    bre = hi_i ? b_i[63:48] : b_i[31:16];
    bim = hi_i ? b_i[47:32] : b_i[15:0];
    pre = 49'(are * bre) - 49'(aim * bim);
    pim = 49'(are * bim) + 49'(aim * bre);
    c_o = {32'(pre >>> FRAC), 32'(pim >>> FRAC)};
  end

endmodule
