// clz_unit: count leading zeros, per subword.
//
// For every subword of the selected size the unit returns the number of zero
// bits above the highest one bit (the full subword width for a zero
// subword), written into that subword. The document adds CLZ as a custom
// instruction to find the range of a square-root input quickly and to
// normalise the CORDIC input; it runs on the 32-bit subwords there. Support
// of all four subword sizes is this design's choice.
//
// Purely combinational.
module clz_unit
  import asip_pkg::*;
(
  input  size_e size_i,
  input  word_t a_i,
  output word_t res_o
);

  function automatic logic [6:0] clz_n(logic [63:0] v, int unsigned w);
    logic [6:0] n;
    logic       found;
    n = 7'(w);
    found = 1'b0;
    for (int i = 63; i >= 0; i--)
      if (i < int'(w) && !found && v[i]) begin
        n = 7'(int'(w) - 1 - i);
        found = 1'b1;
      end
    return n;
  endfunction

  always_comb begin
    res_o = '0;
    unique case (size_i)
      SZ8:  for (int k = 0; k < 8; k++) res_o[8*k  +: 8]  = 8'(clz_n(64'(a_i[8*k  +: 8]), 8));
      SZ16: for (int k = 0; k < 4; k++) res_o[16*k +: 16] = 16'(clz_n(64'(a_i[16*k +: 16]), 16));
      SZ32: for (int k = 0; k < 2; k++) res_o[32*k +: 32] = 32'(clz_n(64'(a_i[32*k +: 32]), 32));
      default: res_o = 64'(clz_n(a_i, 64));
    endcase
  end

endmodule
