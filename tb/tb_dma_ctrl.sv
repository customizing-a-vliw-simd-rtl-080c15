// tb_dma_ctrl: self-check of the DMA controller with a model of an
// external memory that acknowledges after a random delay and a local
// memory whose grant is withdrawn at random. It moves a block from
// external to local, then another block back, and compares both memories
// with the expected contents; busy must fall after the last word.
module tb_dma_ctrl;
  import asip_pkg::word_t;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [1:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic busy, mreq, mwe, mgnt, ereq, ewe, eack;
  logic [13:0] maddr;
  logic [31:0] eaddr;
  word_t mwdata, mrdata, ewdata, erdata;
  word_t ext_mem [256];
  word_t loc_mem [256];
  int checks = 0, failures = 0, cycles = 0, stalls = 0;

  dma_ctrl #(.AW(14), .EAW(32)) dut (.clk(clk), .rst_n(rst_n), .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr),
      .cfg_wdata_i(cfg_wdata), .busy_o(busy), .mem_req_o(mreq), .mem_we_o(mwe), .mem_addr_o(maddr),
      .mem_wdata_o(mwdata), .mem_rdata_i(mrdata), .mem_gnt_i(mgnt), .ext_req_o(ereq), .ext_we_o(ewe),
      .ext_addr_o(eaddr), .ext_wdata_o(ewdata), .ext_rdata_i(erdata), .ext_ack_i(eack));
  always #5 clk = ~clk;

  // memory models
  assign mrdata = loc_mem[maddr[7:0]];
  assign erdata = ext_mem[eaddr[7:0]];
  always @(posedge clk) begin
    cycles++;
    mgnt <= 1'($urandom % 4 != 0);
    eack <= ereq && !eack && ($urandom % 3 == 0);
    if (mreq && !mgnt) stalls++;
    if (mreq && mgnt && mwe) loc_mem[maddr[7:0]] <= mwdata;
    if (ereq && eack && ewe) ext_mem[eaddr[7:0]] <= ewdata;
  end

  task automatic cfg(logic [1:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; mgnt = 0; eack = 0;
    for (int i = 0; i < 256; i++) begin ext_mem[i] = {$urandom, $urandom}; loc_mem[i] = '0; end
    #12 rst_n = 1;
    // 40 words external[16..55] -> local[100..139]
    cfg(0, 16); cfg(1, 100); cfg(2, 40);
    checks++; if (!busy) failures++;
    wait (!busy);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (loc_mem[100 + i] !== ext_mem[16 + i]) failures++;
    end
    checks++; if (loc_mem[99] !== '0 || loc_mem[140] !== '0) failures++;
    // 20 words local[100..119] -> external[200..219]
    cfg(0, 200); cfg(1, 100); cfg(2, 32'h1_0000 | 20);
    wait (!busy);
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (ext_mem[200 + i] !== loc_mem[100 + i]) failures++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no grant stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
