// tb_asip_top: end-to-end run of the processor system at its default sizes.
//
// One audio-block step, in the spirit of the document's hearing-aid chain:
//  1. the DMA copies a 128-sample history (32 words of four 16-bit samples)
//     from the external audio buffer into a circular buffer in data memory,
//     while the core polls the DMA status;
//  2. WOLA analysis windowing and time folding: 32 MAC_16 over the 128-tap
//     window, window and samples loaded in X2 pairs, the sample pointer
//     wrapping around the circular buffer, in a 3-bundle loop;
//  3. one complex multiply with a twiddle, CLZ of its result, a square root
//     of a quarter of it on the co-processor (16 iterations, delayed load), two divisions on
//     the DCU (#4 delay) and the gain limit min(1, g) with CS/CR;
//  4. the DMA writes the nine result words back to external memory.
// Every result is compared with a reference computed here, the cycle count
// must equal one cycle per executed bundle, and each mechanism (X2, CS, CR,
// MAC_16, CMU, CLZ, circular wrap, taken branch, co-processor start, DMA
// in and out, DMA held off by the host port) must have happened.
module tb_asip_top;
  import asip_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, running;
  events_t ev;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  logic [63:0] prog_data = 0;
  logic host_en = 0, host_we = 0;
  logic [AW-1:0] host_addr = 0;
  word_t host_wdata = 0, host_rdata;
  logic ext_req, ext_we, ext_ack = 0;
  logic [31:0] ext_addr;
  word_t ext_wdata, ext_rdata;

  word_t ext_mem [256];
  word_t win [32];
  word_t twid;
  logic [63:0] prog [128];
  int checks = 0, failures = 0, cycles = 0, run_cycles = 0;
  int n_x2 = 0, n_cs = 0, n_cr = 0, n_mac = 0, n_cmu = 0, n_clz = 0, n_wrap = 0, n_br = 0, n_cop = 0;
  int n_dma_rd = 0, n_dma_wr = 0, n_dma_wait = 0;

  asip_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .running_o(running), .events_o(ev),
    .prog_we_i(prog_we), .prog_addr_i(prog_addr), .prog_data_i(prog_data),
    .host_en_i(host_en), .host_we_i(host_we), .host_addr_i(host_addr),
    .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .ext_req_o(ext_req), .ext_we_o(ext_we), .ext_addr_o(ext_addr), .ext_wdata_o(ext_wdata),
    .ext_rdata_i(ext_rdata), .ext_ack_i(ext_ack));

  always #5 clk = ~clk;

  // external memory: acknowledges one cycle after a request
  assign ext_rdata = ext_mem[ext_addr[7:0]];
  always @(posedge clk) begin
    ext_ack <= ext_req && !ext_ack;
    if (ext_req && ext_ack) begin
      if (ext_we) begin ext_mem[ext_addr[7:0]] <= ext_wdata; n_dma_wr++; end
      else n_dma_rd++;
    end
  end

  always @(posedge clk) begin
    cycles++;
    if (running) run_cycles++;
    if (ev.x2) n_x2++;
    if (ev.cs) n_cs++;
    if (ev.cr) n_cr++;
    if (ev.mac) n_mac++;
    if (ev.cmu) n_cmu++;
    if (ev.clz) n_clz++;
    if (ev.wrap) n_wrap++;
    if (ev.branch) n_br++;
    if (ev.cop_start) n_cop++;
    if (dut.u_dma.mem_req_o && host_en) n_dma_wait++;
  end

  // the host port borrows the data memory for a few cycles during the DMA-in
  initial begin
    wait (n_dma_rd == 5);
    @(negedge clk); host_en = 1; host_addr = 14'd1000;
    repeat (4) @(negedge clk);
    host_en = 0;
  end

  // ---------------- references
  function automatic logic [15:0] ref_div(logic [31:0] a, logic [31:0] d);
    logic [63:0] q;
    if (d == 0) return 16'hFFFF;
    q = (64'(a) << 15) / 64'(d);
    return (q > 64'hFFFF) ? 16'hFFFF : q[15:0];
  endfunction
  function automatic logic [31:0] ref_isqrt(logic [63:0] v);
    logic [31:0] r = 0;
    for (int i = 31; i >= 0; i--) begin
      logic [31:0] t = r | (32'd1 << i);
      if (64'(t) * 64'(t) <= v) r = t;
    end
    return r;
  endfunction
  function automatic word_t ref_cmu(word_t x, word_t y, bit h);
    longint are = longint'(int'(x[63:32])), aim = longint'(int'(x[31:0]));
    longint bre = longint'(shortint'(h ? y[63:48] : y[31:16]));
    longint bim = longint'(shortint'(h ? y[47:32] : y[15:0]));
    return {32'((are*bre - aim*bim) >>> 15), 32'((are*bim + aim*bre) >>> 15)};
  endfunction
  function automatic logic [63:0] clz64(logic [63:0] v);
    for (int i = 63; i >= 0; i--) if (v[i]) return 64'(63 - i);
    return 64;
  endfunction

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic host_write(int a, word_t d);
    @(negedge clk); host_en = 1; host_we = 1; host_addr = AW'(a); host_wdata = d;
    @(negedge clk); host_en = 0; host_we = 0;
  endtask

  function automatic logic [63:0] b(logic [31:0] s0, logic [31:0] s1 = 32'd0);
    return {s1, s0};
  endfunction

  initial begin
    int p;
    int nstatic;
    word_t acc [4];
    word_t res [9];
    logic [31:0] root;
    logic [15:0] q1, q2;
    longint lane [8];

    for (int i = 0; i < 256; i++) ext_mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 32; i++) win[i] = {$urandom, $urandom};
    twid = {$urandom, $urandom};
    for (int i = 0; i < 128; i++) prog[i] = '0;

    // ---- program
    prog[0]  = b(enc_smvi(SR_APTR0, 16'd0),      enc_mvi(SZ64, 20, 14'd16));
    prog[1]  = b(enc_smvi(SR_APTR0 + 1, 16'd88), enc_mvi(SZ64, 21, 14'd0));
    prog[2]  = b(enc_smvi(SR_AMASK0 + 1, 16'h3FE0));
    prog[3]  = b(enc_mvi(SZ64, 22, 14'd64),      enc_mvi(SZ64, 23, 14'd32));
    prog[4]  = b(enc_stcop(COP_DMA_EXT, 21, 0));
    prog[5]  = b(enc_stcop(COP_DMA_LOC, 22, 0));
    prog[6]  = b(enc_stcop(COP_DMA_CTRL, 23, 0));
    prog[7]  = b(enc_ldcop(19, COP_DMA_STAT));
    prog[8]  = b(enc_br(BR_NZERO, 19, 7));
    // WOLA windowing / time folding loop
    prog[9]  = b(enc_ldp(0, 0, 1, 1),            enc_alu(OP_MAC16, SZ16, 6, 1, 3));
    prog[10] = b(enc_ldp(2, 1, 1, 1),            enc_alui(OP_SUB, SZ64, 20, 20, 8'sd1));
    prog[11] = b(enc_br(BR_NZERO, 20, 9),        enc_alu(OP_MAC16, SZ16, 4, 0, 2));
    prog[12] = b(enc_sta(4, 200, 1),             enc_alu(OP_MAC16, SZ16, 6, 1, 3));
    prog[13] = b(enc_sta(6, 202, 1));
    prog[14] = b(enc_lda(8, 40));
    prog[15] = b(enc_nop(),                      enc_cmu(9, 4, 8, 0));
    prog[16] = b(enc_sta(9, 204),                enc_alui(OP_SHR, SZ64, 10, 9, 8'sd2));
    prog[17] = b(enc_stcop(COP_SQRT, 10, 6'd16), enc_alu(OP_CLZ, SZ64, 11, 9, 0));
    prog[18] = b(enc_sta(11, 205));
    // 19..33: NOPs while the square root iterates
    prog[34] = b(enc_ldcop(12, COP_SQRT));
    prog[35] = b(enc_stcop(COP_DCU_A, 12, 0),    enc_alui(OP_SHR, SZ64, 14, 12, 8'sd1));
    prog[36] = b(enc_nop(),                      enc_alu(OP_ADD, SZ64, 13, 12, 14));
    prog[37] = b(enc_stcop(COP_DCU_B, 13, 6'd4));
    // 38..41: the DCU's #4 delay, filled with a store
    prog[38] = b(enc_sta(12, 206));
    prog[42] = b(enc_ldcop(15, COP_DCU_A));
    prog[43] = b(enc_stcop(COP_DCU_B, 14, 6'd4));
    prog[48] = b(enc_ldcop(16, COP_DCU_A),       enc_mvi(SZ32, 17, 14'd1));
    prog[49] = b(enc_smvi(SR_CONDSEL, 16'(COND_NNEG)), enc_alui(OP_SHL, SZ32, 17, 17, 8'sd15));
    prog[50] = b(enc_alui(OP_SUB, SZ32, 19, 17, 8'sd1), enc_alu(OP_SUB, SZ32, 18, 15, 17, 0, 1, 0));
    prog[51] = b(enc_alu(OP_MV, SZ32, 15, 19, 0, 0, 0, 1), enc_alu(OP_SUB, SZ32, 18, 16, 17, 0, 1, 0));
    prog[52] = b(enc_alu(OP_MV, SZ32, 16, 19, 0, 0, 0, 1));
    prog[53] = b(enc_sta(15, 207));
    prog[54] = b(enc_sta(16, 208));
    prog[55] = b(enc_nop());
    prog[56] = b(enc_mvi(SZ64, 23, 14'd1),       enc_mvi(SZ64, 22, 14'd200));
    prog[57] = b(enc_alui(OP_SHL, SZ64, 23, 23, 8'sd16), enc_mvi(SZ64, 21, 14'd64));
    prog[58] = b(enc_alui(OP_ADD, SZ64, 23, 23, 8'sd9));
    prog[59] = b(enc_stcop(COP_DMA_EXT, 21, 0));
    prog[60] = b(enc_stcop(COP_DMA_LOC, 22, 0));
    prog[61] = b(enc_stcop(COP_DMA_CTRL, 23, 0));
    prog[62] = b(enc_ldcop(19, COP_DMA_STAT));
    prog[63] = b(enc_br(BR_NZERO, 19, 62));
    prog[64] = b(enc_halt());
    nstatic = 65;

    #12 rst_n = 1;
    for (int i = 0; i < nstatic; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 32; i++) host_write(i, win[i]);
    host_write(40, twid);

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    @(negedge clk);

    // ---- reference: window x samples, four lanes for even and odd words
    for (int k = 0; k < 8; k++) lane[k] = 0;
    for (int j = 0; j < 32; j++) begin
      word_t s;
      s = ext_mem[(24 + j) % 32];
      for (int k = 0; k < 4; k++)
        lane[(j % 2) * 4 + k] += longint'(shortint'(win[j][16*k +: 16])) * longint'(shortint'(s[16*k +: 16]));
    end
    for (int r = 0; r < 4; r++) acc[r] = {32'(lane[2*r+1]), 32'(lane[2*r])};
    res[0] = acc[0]; res[1] = acc[1]; res[2] = acc[2]; res[3] = acc[3];
    res[4] = ref_cmu(acc[0], twid, 0);
    res[5] = clz64(res[4]);
    root   = ref_isqrt(res[4] >> 2);
    res[6] = 64'(root);
    q1 = ref_div(root, 32'(64'(root) + 64'(root >> 1)));
    q2 = ref_div(root, root >> 1);
    res[7] = {32'd0, (q1 >= 16'h8000) ? 32'h7FFF : 32'(q1)};
    res[8] = {32'd0, (q2 >= 16'h8000) ? 32'h7FFF : 32'(q2)};

    for (int i = 0; i < 9; i++) begin
      host_en = 1; host_addr = AW'(200 + i); #1;
      chk($sformatf("data memory result %0d", i), host_rdata, res[i]);
      host_en = 0;
      chk($sformatf("external memory result %0d", i), ext_mem[64 + i], res[i]);
    end
    // one cycle per executed bundle: WOLA loop taken 15 times (3 bundles),
    // every other taken branch is a 2-bundle DMA poll
    chk("cycles", 64'(run_cycles), 64'(nstatic + 15 * 3 + 2 * (n_br - 15)));
    chk("MAC_16 count", 64'(n_mac), 64'd33);
    chk("circular wraps", 64'(n_wrap), 64'd1);
    chk("DMA words in", 64'(n_dma_rd), 64'd32);
    chk("DMA words out", 64'(n_dma_wr), 64'd9);
    chk("co-processor starts", 64'(n_cop), 64'd5);
    checks++;
    if (n_x2 == 0 || n_cs == 0 || n_cr == 0 || n_cmu == 0 || n_clz == 0 || n_br < 16 || n_dma_wait == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: x2=%0d cs=%0d cr=%0d cmu=%0d clz=%0d br=%0d dma_wait=%0d",
               n_x2, n_cs, n_cr, n_cmu, n_clz, n_br, n_dma_wait);
    end
    $display("events: x2=%0d cs=%0d cr=%0d mac=%0d cmu=%0d clz=%0d wrap=%0d branch=%0d cop=%0d dma_in=%0d dma_out=%0d dma_wait=%0d",
             n_x2, n_cs, n_cr, n_mac, n_cmu, n_clz, n_wrap, n_br, n_cop, n_dma_rd, n_dma_wr, n_dma_wait);
    $display("core cycles for the block step: %0d", run_cycles);
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
