// asip_top: the hearing-aid processor system.
//
// One dual-issue VLIW-SIMD vector unit (vliw_core) in its minimal-pipeline,
// X2-enabled configuration, with a separate instruction memory (imem) and
// data memory (dmem), a DMA controller (dma_ctrl) to an external memory or
// audio buffer, and two co-processors on the co-processor port: the
// division unit (dcu) and the square-root unit (sqrt_cop). This is the set
// of parts of the configuration the document finds most efficient (CORDIC
// square root, complex multiply unit, X2 mode, extended register file,
// minimal pipeline), with the complex multiply, MAC_16 and CLZ inside the
// core's lanes.
//
// Co-processor address map (loads and stores through slot 0):
//   0x100 DMA external address   0x101 DMA local address
//   0x102 DMA control (store starts)   0x103 DMA status (load, bit 0 busy)
//   0x200 DCU dividend / quotient      0x201 DCU divisor (store starts)
//   0x300 square-root radicand (store starts) / root
//
// Outside access: prog_* writes 64-bit bundles into the instruction memory,
// host_* reads and writes data-memory words through the second data-memory
// port (the DMA waits while host_en_i is high). start_i starts the core at
// bundle 0; running_o falls after HALT. The ext_* bus goes to the external
// memory (request held until acknowledged).
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,   // bundles
  parameter int unsigned DMEM_DEPTH = 2048    // 64-bit words
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start_i,
  output logic                          running_o,
  output events_t                       events_o,
  // program loading
  input  logic                          prog_we_i,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr_i,
  input  logic [63:0]                   prog_data_i,
  // host access to the data memory
  input  logic                          host_en_i,
  input  logic                          host_we_i,
  input  logic [AW-1:0]                 host_addr_i,
  input  word_t                         host_wdata_i,
  output word_t                         host_rdata_o,
  // external memory / audio buffer
  output logic                          ext_req_o,
  output logic                          ext_we_o,
  output logic [31:0]                   ext_addr_o,
  output word_t                         ext_wdata_o,
  input  word_t                         ext_rdata_i,
  input  logic                          ext_ack_i
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);

  // core <-> memories
  logic [IAW-1:0] imem_addr;
  logic [63:0]    imem_rdata;
  logic [AW-1:0]  da_addr;
  logic           da_pair, da_we;
  word_t [1:0]    da_wdata, da_rdata;
  // co-processor port
  logic           cop_we;
  logic [CAW-1:0] cop_addr;
  word_t          cop_wdata, cop_rdata;
  logic [5:0]     cop_iters;
  // DMA
  logic           dma_busy, dma_mreq, dma_mwe;
  logic [AW-1:0]  dma_maddr;
  word_t          dma_mwdata, db_rdata;
  // co-processor results
  logic [15:0]    dcu_q;
  logic [31:0]    root;
  logic           dcu_busy, sqrt_busy;

  vliw_core #(.IAW(IAW)) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start_i),
    .running_o    (running_o),
    .imem_addr_o  (imem_addr),
    .imem_rdata_i (imem_rdata),
    .dmem_addr_o  (da_addr),
    .dmem_pair_o  (da_pair),
    .dmem_we_o    (da_we),
    .dmem_wdata_o (da_wdata),
    .dmem_rdata_i (da_rdata),
    .cop_we_o     (cop_we),
    .cop_addr_o   (cop_addr),
    .cop_wdata_o  (cop_wdata),
    .cop_iters_o  (cop_iters),
    .cop_rdata_i  (cop_rdata),
    .events_o     (events_o)
  );

  imem #(.DEPTH(IMEM_DEPTH), .W(64)) u_imem (
    .clk     (clk),
    .raddr_i (imem_addr),
    .rdata_o (imem_rdata),
    .we_i    (prog_we_i),
    .waddr_i (prog_addr_i),
    .wdata_i (prog_data_i)
  );

  dmem #(.DEPTH(DMEM_DEPTH), .AW(AW)) u_dmem (
    .clk       (clk),
    .a_addr_i  (da_addr),
    .a_pair_i  (da_pair),
    .a_we_i    (da_we),
    .a_wdata_i (da_wdata),
    .a_rdata_o (da_rdata),
    .b_addr_i  (host_en_i ? host_addr_i : dma_maddr),
    .b_we_i    (host_en_i ? host_we_i : (dma_mreq && dma_mwe)),
    .b_wdata_i (host_en_i ? host_wdata_i : dma_mwdata),
    .b_rdata_o (db_rdata)
  );
  assign host_rdata_o = db_rdata;

  dma_ctrl #(.AW(AW), .EAW(32)) u_dma (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_we_i    (cop_we && cop_addr[CAW-1:2] == COP_DMA_EXT[CAW-1:2]),
    .cfg_addr_i  (cop_addr[1:0]),
    .cfg_wdata_i (cop_wdata[31:0]),
    .busy_o      (dma_busy),
    .mem_req_o   (dma_mreq),
    .mem_we_o    (dma_mwe),
    .mem_addr_o  (dma_maddr),
    .mem_wdata_o (dma_mwdata),
    .mem_rdata_i (db_rdata),
    .mem_gnt_i   (!host_en_i),
    .ext_req_o   (ext_req_o),
    .ext_we_o    (ext_we_o),
    .ext_addr_o  (ext_addr_o),
    .ext_wdata_o (ext_wdata_o),
    .ext_rdata_i (ext_rdata_i),
    .ext_ack_i   (ext_ack_i)
  );

  dcu #(.DW(32), .QW(16), .FRAC(15), .BPI(4)) u_dcu (
    .clk      (clk),
    .rst_n    (rst_n),
    .we_i     (cop_we && (cop_addr == COP_DCU_A || cop_addr == COP_DCU_B)),
    .addr_i   (cop_addr == COP_DCU_B),
    .wdata_i  (cop_wdata[31:0]),
    .iters_i  (cop_iters),
    .result_o (dcu_q),
    .busy_o   (dcu_busy)
  );

  sqrt_cop #(.RW(64)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .we_i     (cop_we && cop_addr == COP_SQRT),
    .wdata_i  (cop_wdata),
    .iters_i  (cop_iters),
    .result_o (root),
    .busy_o   (sqrt_busy)
  );

  always_comb begin
    unique case (cop_addr)
      COP_DCU_A:    cop_rdata = 64'(dcu_q);
      COP_DCU_B:    cop_rdata = 64'(dcu_busy);
      COP_SQRT:     cop_rdata = 64'(root);
      COP_SQRT + 1: cop_rdata = 64'(sqrt_busy);
      COP_DMA_STAT: cop_rdata = 64'(dma_busy);
      default:      cop_rdata = '0;
    endcase
  end

endmodule
