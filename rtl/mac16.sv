// mac16: the MAC_16 SIMD multiply-accumulate.
//
// The two 64-bit sources hold four signed 16-bit subwords each. The four
// products a[k]*b[k] are each added to one 32-bit accumulator. The four
// accumulators live in a register pair: lanes 0 and 1 in acc_lo (the named
// destination register, [acc1|acc0]) and lanes 2 and 3 in acc_hi (the second
// destination). That matches the document: a MAC_16 has two destination
// registers, stores real-valued sums as two 32-bit subwords per register,
// and WOLA analysis of La taps needs La/4 MAC_16 operations. The products are
// kept at full 32-bit width and the sums wrap (no saturation); scaling is
// left to later shift instructions, as the document describes for the
// synthesis path. Which product goes to which accumulator is this design's
// choice.
//
// Purely combinational; the core writes both results in its RA/EX stage.
module mac16
  import asip_pkg::*;
(
  input  word_t a_i,
  input  word_t b_i,
  input  word_t acc_lo_i,
  input  word_t acc_hi_i,
  output word_t acc_lo_o,
  output word_t acc_hi_o
);

  logic [3:0][31:0] acc_in, acc_out;

  always_comb begin
    acc_in = {acc_hi_i, acc_lo_i};
    for (int k = 0; k < 4; k++)
      acc_out[k] = acc_in[k] + 32'($signed(a_i[16*k +: 16]) * $signed(b_i[16*k +: 16]));
    {acc_hi_o, acc_lo_o} = acc_out;
  end

endmodule
