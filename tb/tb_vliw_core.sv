// tb_vliw_core: program-level self-check of the vector unit.
//
// The core runs a hand-assembled program from a testbench instruction
// memory, with a testbench data memory (two banks, combinational read) and a
// co-processor model. The program exercises X1 and X2 loads and stores,
// 16-bit SIMD add in X2 mode, a set-flags subtract followed by a
// conditional add (the document's Fig. 2 example), two MAC_16 into a
// register pair, a complex multiply, CLZ, MIXRL in X2 mode, a loop that
// reads through a 4-word circular buffer with a post-incremented pointer
// (one wrap), linear X2 pointer loads, and a co-processor store/load. Each
// result is stored to memory and compared with a value computed here from
// the input data. The run must take exactly one cycle per executed bundle
// (taken branches cost nothing).
module tb_vliw_core;
  import asip_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, running;
  logic [9:0]  iaddr;
  logic [63:0] irdata;
  logic [AW-1:0] daddr;
  logic dpair, dwe;
  word_t [1:0] dwdata, drdata;
  logic cop_we;
  logic [CAW-1:0] cop_addr;
  word_t cop_wdata, cop_rdata;
  logic [5:0] cop_iters;
  events_t ev;

  logic [63:0] prog [1024];
  word_t mem [256];
  word_t cop_reg;
  logic [5:0] cop_it_seen;
  int checks = 0, failures = 0, cycles = 0, run_cycles = 0;
  int n_x2 = 0, n_cs = 0, n_cr = 0, n_mac = 0, n_cmu = 0, n_clz = 0, n_wrap = 0, n_br = 0, n_cop = 0;

  vliw_core #(.IAW(10)) dut (.clk(clk), .rst_n(rst_n), .start_i(start), .running_o(running),
      .imem_addr_o(iaddr), .imem_rdata_i(irdata), .dmem_addr_o(daddr), .dmem_pair_o(dpair),
      .dmem_we_o(dwe), .dmem_wdata_o(dwdata), .dmem_rdata_i(drdata), .cop_we_o(cop_we),
      .cop_addr_o(cop_addr), .cop_wdata_o(cop_wdata), .cop_iters_o(cop_iters),
      .cop_rdata_i(cop_rdata), .events_o(ev));

  always #5 clk = ~clk;

  // memories and co-processor model
  always @(posedge clk) irdata <= prog[iaddr];
  always_comb begin
    logic [7:0] a;
    a = dpair ? (daddr[7:0] & 8'hFE) : daddr[7:0];
    drdata[0] = mem[a];
    drdata[1] = dpair ? mem[a + 1] : '0;
  end
  always @(posedge clk) begin
    logic [7:0] a;
    a = dpair ? (daddr[7:0] & 8'hFE) : daddr[7:0];
    if (dwe) begin
      mem[a] <= dwdata[0];
      if (dpair) mem[a + 1] <= dwdata[1];
    end
    if (cop_we && cop_addr == 10'h200) begin cop_reg <= cop_wdata; cop_it_seen <= cop_iters; end
  end
  assign cop_rdata = (cop_addr == 10'h200) ? ~cop_reg : '0;

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
  end

  // ---------------- reference helpers
  function automatic word_t add_sw(word_t x, word_t y, int w);
    word_t r = '0, m = (w == 64) ? '1 : (64'd1 << w) - 1;
    for (int k = 0; k < 64 / w; k++) r |= ((((x >> (k*w)) & m) + ((y >> (k*w)) & m)) & m) << (k*w);
    return r;
  endfunction
  function automatic word_t ref_cmu(word_t x, word_t y, bit h);
    longint are = longint'(int'(x[63:32])), aim = longint'(int'(x[31:0]));
    longint bre = longint'(shortint'(h ? y[63:48] : y[31:16]));
    longint bim = longint'(shortint'(h ? y[47:32] : y[15:0]));
    return {32'((are*bre - aim*bim) >>> 15), 32'((are*bim + aim*bre) >>> 15)};
  endfunction
  function automatic word_t mac_lo(word_t x, word_t y, word_t acc);
    word_t r;
    for (int k = 0; k < 2; k++)
      r[32*k +: 32] = acc[32*k +: 32] + 32'(int'(shortint'(x[16*k +: 16])) * int'(shortint'(y[16*k +: 16])));
    return r;
  endfunction
  function automatic word_t mac_hi(word_t x, word_t y, word_t acc);
    word_t r;
    for (int k = 0; k < 2; k++)
      r[32*k +: 32] = acc[32*k +: 32] + 32'(int'(shortint'(x[16*(k+2) +: 16])) * int'(shortint'(y[16*(k+2) +: 16])));
    return r;
  endfunction
  function automatic logic [31:0] clz32(logic [31:0] v);
    for (int i = 31; i >= 0; i--) if (v[i]) return 32'(31 - i);
    return 32;
  endfunction

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] b(logic [31:0] s0, logic [31:0] s1 = 32'd0);
    return {s1, s0};
  endfunction

  initial begin
    word_t m0 [256];
    int nb;
    for (int i = 0; i < 1024; i++) prog[i] = '0;
    for (int i = 0; i < 256; i++) mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 8; i++) if ($urandom % 2) mem[7][8*i +: 8] = mem[6][8*i +: 8];
    mem[2][31:0] = 32'h0000_1234;   // known leading zeros in one subword
    m0 = mem;

    prog[0]  = b(enc_lda(0, 0, 1));
    prog[1]  = b(enc_lda(2, 2, 1));
    prog[2]  = b(enc_lda(6, 6, 1),   enc_alu(OP_ADD, SZ16, 4, 0, 2, 1));
    prog[3]  = b(enc_sta(4, 100, 1), enc_alu(OP_SUB, SZ8, 8, 6, 7, 0, 1, 0));
    prog[4]  = b(enc_smvi(SR_CONDSEL, 16'(COND_ZERO)), enc_mvi(SZ8, 9, 14'h11));
    prog[5]  = b(enc_sta(8, 102),    enc_alu(OP_ADD, SZ8, 9, 0, 1, 0, 0, 1));
    prog[6]  = b(enc_sta(9, 103),    enc_alu(OP_MAC16, SZ16, 10, 0, 1));
    prog[7]  = b(enc_nop(),          enc_alu(OP_MAC16, SZ16, 10, 2, 3));
    prog[8]  = b(enc_sta(10, 104, 1), enc_cmu(12, 0, 1, 1));
    prog[9]  = b(enc_sta(12, 106),   enc_alu(OP_CLZ, SZ32, 13, 2, 0));
    prog[10] = b(enc_sta(13, 107),   enc_alu(OP_MIXRL, SZ16, 14, 0, 2, 1));
    prog[11] = b(enc_sta(14, 108, 1));
    prog[12] = b(enc_smvi(SR_APTR0 + 1, 16'd16), enc_mvi(SZ64, 20, 14'd5));
    prog[13] = b(enc_smvi(SR_AMASK0 + 1, 16'h3FFC), enc_mvi(SZ64, 21, 14'd0));
    prog[14] = b(enc_ldp(22, 1, 1),  enc_alui(OP_SUB, SZ64, 20, 20, 8'sd1));
    prog[15] = b(enc_br(BR_NZERO, 20, 14), enc_alu(OP_ADD, SZ64, 21, 21, 22));
    prog[16] = b(enc_sta(21, 110));
    prog[17] = b(enc_smvi(SR_APTR0 + 2, 16'd32));
    prog[18] = b(enc_ldp(24, 2, 1, 1));
    prog[19] = b(enc_ldp(26, 2, 1, 1));
    prog[20] = b(enc_nop(),          enc_alu(OP_ADD, SZ32, 28, 24, 26, 1));
    prog[21] = b(enc_sta(28, 112, 1));
    prog[22] = b(enc_stcop(10'h200, 0, 6'd4));
    prog[23] = b(enc_ldcop(30, 10'h200));
    prog[24] = b(enc_sta(30, 114));
    prog[25] = b(enc_halt());
    nb = 26 + 2 * 4;   // the loop body runs five times

    #12 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    @(negedge clk);

    chk("x2 add16 lane0", mem[100], add_sw(m0[0], m0[2], 16));
    chk("x2 add16 lane1", mem[101], add_sw(m0[1], m0[3], 16));
    chk("sub8 with flags", mem[102], add_sw(m0[6], add_sw(~m0[7], 64'h0101010101010101, 8), 8));
    begin
      word_t e;
      e = add_sw(m0[0], m0[1], 8);
      for (int i = 0; i < 8; i++) if (m0[6][8*i +: 8] != m0[7][8*i +: 8]) e[8*i +: 8] = 8'h11;
      chk("conditional add (CR)", mem[103], e);
    end
    chk("MAC_16 low acc",  mem[104], mac_lo(m0[2], m0[3], mac_lo(m0[0], m0[1], 0)));
    chk("MAC_16 high acc", mem[105], mac_hi(m0[2], m0[3], mac_hi(m0[0], m0[1], 0)));
    chk("CMU", mem[106], ref_cmu(m0[0], m0[1], 1));
    chk("CLZ", mem[107], {clz32(m0[2][63:32]), 32'd19});
    chk("MIXR lane0", mem[108], {m0[0][47:32], m0[2][47:32], m0[0][15:0], m0[2][15:0]});
    chk("MIXL lane1", mem[109], {m0[1][63:48], m0[3][63:48], m0[1][31:16], m0[3][31:16]});
    chk("circular loop sum", mem[110], m0[16] + m0[17] + m0[18] + m0[19] + m0[16]);
    chk("X2 pointer loads lane0", mem[112], add_sw(m0[32], m0[34], 32));
    chk("X2 pointer loads lane1", mem[113], add_sw(m0[33], m0[35], 32));
    chk("co-processor load", mem[114], ~m0[0]);
    chk("co-processor iterations", 64'(cop_it_seen), 64'd4);
    chk("cycles (one bundle per cycle)", 64'(run_cycles), 64'(nb));
    chk("taken branches", 64'(n_br), 64'd4);
    chk("circular wraps", 64'(n_wrap), 64'd1);
    checks++;
    if (n_x2 == 0 || n_cs == 0 || n_cr == 0 || n_mac != 2 || n_cmu != 1 || n_clz != 1 || n_cop != 0) begin
      // DCU_B is not written here, so no co-processor start is counted
      failures++;
      $display("FAIL event counts x2=%0d cs=%0d cr=%0d mac=%0d cmu=%0d clz=%0d cop=%0d",
               n_x2, n_cs, n_cr, n_mac, n_cmu, n_clz, n_cop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
