// imem: instruction memory.
//
// DEPTH bundles of 64 bits (two 32-bit slot instructions each). The core
// reads it synchronously: the address given in one cycle returns its bundle
// after the next rising edge, which forms the fetch stage of the pipeline.
// A second, write-only port loads programs from outside while the core is
// stopped. The document only says that instruction and data memories are
// separate and of configurable size; the depth and the ports are this
// design's.
module imem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic [W-1:0]             rdata_o,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic [W-1:0]             wdata_i
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rdata_o <= mem[raddr_i];
  end

endmodule
