// x2_regfile: the vector unit's register file with X2 pair access.
//
// NREG registers of XLEN bits are shared by both issue slots. Every read
// port returns a pair: the addressed register and its partner whose address
// differs only in the last bit (rdata_o[p][0] = R[a], rdata_o[p][1] =
// R[a^1]). That is what the X2 mode needs: one merged X2 instruction reads
// and writes two registers that differ only in their last address bit, so
// the file is organised as an even bank and an odd bank of NREG/2 registers
// each, and a pair access touches each bank once. The document lists the
// register file as two banks of 32 registers; its port counts per
// configuration are not available here, so the port numbers below are this
// design's: three pair read ports per slot (ra, rb and the old destination,
// needed for accumulation, conditional execution and stores) and two write
// ports per slot (one per X2 lane).
//
// Reads are combinational; writes happen at the rising clock edge. When two
// write ports hit the same register in one cycle the higher-numbered port
// wins. All registers reset to zero.
module x2_regfile
  import asip_pkg::word_t;
#(
  parameter int unsigned NREG = 64,
  parameter int unsigned NRP  = 6,    // pair read ports
  parameter int unsigned NWP  = 4     // write ports
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NRP-1:0][$clog2(NREG)-1:0]       raddr_i,
  output word_t [NRP-1:0][1:0]                   rdata_o,
  input  logic [NWP-1:0]                         we_i,
  input  logic [NWP-1:0][$clog2(NREG)-1:0]       waddr_i,
  input  word_t [NWP-1:0]                        wdata_i
);

  localparam int unsigned RW = $clog2(NREG);

  word_t regs [NREG];

  always_comb begin
    for (int p = 0; p < int'(NRP); p++) begin
      rdata_o[p][0] = regs[raddr_i[p]];
      rdata_o[p][1] = regs[raddr_i[p] ^ RW'(1)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NREG); r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(NWP); p++)
        if (we_i[p]) regs[waddr_i[p]] <= wdata_i[p];
    end
  end

endmodule
