// dmem: data memory, two banks, two ports.
//
// DEPTH words of 64 bits, split into an even-address and an odd-address
// bank so that port A (the core) can move an aligned word pair in one
// access, as an X2 load or store does (MV_X2 loads two 64-bit registers in
// one instruction). Port A with pair_i = 0 accesses the single word at
// a_addr_i; with pair_i = 1 it accesses the two words at a_addr_i with the
// last address bit cleared (data index 0) and set (data index 1). Port B
// moves one word and serves the DMA controller and program loading. Reads
// are combinational so that a load completes in the core's single RA/EX
// stage; writes take effect at the rising edge, port A over port B when
// both write the same word. The document only says that the data memory is
// separate and of configurable size; the banking, the ports and the depth
// are this design's.
module dmem
  import asip_pkg::word_t;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = 14
) (
  input  logic           clk,
  // port A: core
  input  logic [AW-1:0]  a_addr_i,
  input  logic           a_pair_i,
  input  logic           a_we_i,
  input  word_t [1:0]    a_wdata_i,
  output word_t [1:0]    a_rdata_o,
  // port B: DMA / loader
  input  logic [AW-1:0]  b_addr_i,
  input  logic           b_we_i,
  input  word_t          b_wdata_i,
  output word_t          b_rdata_o
);

  localparam int unsigned BW = $clog2(DEPTH / 2);

  word_t bank0 [DEPTH/2];   // even word addresses
  word_t bank1 [DEPTH/2];   // odd word addresses

  logic [BW-1:0] a_row, b_row;
  assign a_row = a_addr_i[BW:1];
  assign b_row = b_addr_i[BW:1];

  always_comb begin
    if (a_pair_i) begin
      a_rdata_o[0] = bank0[a_row];
      a_rdata_o[1] = bank1[a_row];
    end else begin
      a_rdata_o[0] = a_addr_i[0] ? bank1[a_row] : bank0[a_row];
      a_rdata_o[1] = '0;
    end
    b_rdata_o = b_addr_i[0] ? bank1[b_row] : bank0[b_row];
  end

  logic a_we0, a_we1;
  word_t a_wd0, a_wd1;
  always_comb begin
    a_we0 = a_we_i && (a_pair_i || !a_addr_i[0]);
    a_we1 = a_we_i && (a_pair_i ||  a_addr_i[0]);
    a_wd0 = a_wdata_i[0];
    a_wd1 = a_pair_i ? a_wdata_i[1] : a_wdata_i[0];
  end

  always_ff @(posedge clk) begin
    if (b_we_i && !b_addr_i[0] && !(a_we0 && a_row == b_row)) bank0[b_row] <= b_wdata_i;
    if (b_we_i &&  b_addr_i[0] && !(a_we1 && a_row == b_row)) bank1[b_row] <= b_wdata_i;
    if (a_we0) bank0[a_row] <= a_wd0;
    if (a_we1) bank1[a_row] <= a_wd1;
  end

endmodule
