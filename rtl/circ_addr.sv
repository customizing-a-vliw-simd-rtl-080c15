// circ_addr: address pointer post-increment with circular-buffer wrap.
//
// Implements the document's rule
//   addr_new = (addr_prev AND mask) OR (inc(addr_prev) AND NOT mask)
// The mask splits the address: bits where the mask is 1 keep the old value,
// bits where it is 0 take the incremented value, so the pointer wraps inside
// a buffer whose size is 2^(number of low zero mask bits) and whose start is
// aligned to that size. A mask of all ones keeps the pointer fixed; a mask
// of zero gives a plain linear increment. The step is 1 for a normal access
// and 2 for an X2 access, which moves two words. wrap_o flags a wrap, that
// is a carry out of the masked-off low part. The step input and the wrap
// flag are this design's additions.
//
// Purely combinational.
module circ_addr #(
  parameter int unsigned AW = 14
) (
  input  logic [AW-1:0] addr_i,
  input  logic [AW-1:0] mask_i,
  input  logic [1:0]    step_i,
  output logic [AW-1:0] addr_o,
  output logic          wrap_o
);

  logic [AW-1:0] inc;

  always_comb begin
    inc    = addr_i + AW'(step_i);
    addr_o = (addr_i & mask_i) | (inc & ~mask_i);
    // a wrap is a carry out of the low (mask = 0) part
    wrap_o = ({1'b0, addr_i & ~mask_i} + (AW+1)'(step_i)) > {1'b0, ~mask_i};
  end

endmodule
