// tb_fft_workload: the 32-point FFT at the heart of the WOLA filter bank
// (N = 32), run on the full system at its default sizes with the complex
// multiply unit doing every twiddle multiplication.
//
// Data are [Re | Im] words with 32-bit parts; twiddles W^k = e^(-2*pi*j*k/32)
// are Q1.15 and packed two per word, so the CMU's high/low select picks
// one. The testbench generates a straight-line radix-2 decimation-in-time
// program (5 stages x 16 butterflies, one load of each operand, CMU, add and
// subtract on 32-bit subwords, two stores), loads the input in bit-reversed
// order and runs it twice: on random data, compared bit-exactly with an
// integer model of the same arithmetic, and on a real cosine at bin 3,
// which must put nearly all energy in bins 3 and 29.
//
// It then builds a scheduled version of the same FFT and checks it
// bit-exactly as well. The twiddles are held in registers. Butterflies go
// in pairs: X2 loads and stores move a word pair per access, and from stage
// 2 on the adds and subtracts run as X2 instructions on both butterflies at
// once. A greedy in-order list scheduler packs the operations into bundles.
// It puts memory operations only in slot 0 and keeps them in program order.
// An operation is placed one bundle after the last write of any register it
// reads or writes, and no earlier than the last read of any register it
// writes. Every result is ready for the next bundle, so no other latency
// applies.
module tb_fft_workload;
  import asip_pkg::*;

  localparam int N = 32;
  localparam int XB = 300;   // data base address
  localparam int TB = 400;   // twiddle base address

  logic clk = 0, rst_n = 0, start = 0, running;
  events_t ev;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  logic [63:0] prog_data = 0;
  logic host_en = 0, host_we = 0;
  logic [AW-1:0] host_addr = 0;
  word_t host_wdata = 0, host_rdata;
  logic ext_req, ext_we;
  logic [31:0] ext_addr;
  word_t ext_wdata;
  int checks = 0, failures = 0, cycles = 0, run_cycles = 0, n_cmu = 0;

  asip_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .running_o(running), .events_o(ev),
    .prog_we_i(prog_we), .prog_addr_i(prog_addr), .prog_data_i(prog_data),
    .host_en_i(host_en), .host_we_i(host_we), .host_addr_i(host_addr),
    .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .ext_req_o(ext_req), .ext_we_o(ext_we), .ext_addr_o(ext_addr), .ext_wdata_o(ext_wdata),
    .ext_rdata_i('0), .ext_ack_i(1'b1));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (running) run_cycles++;
    if (ev.cmu) n_cmu++;
  end

  logic signed [15:0] wre [N/2], wim [N/2];

  function automatic int bitrev5(int i);
    int r = 0;
    for (int k = 0; k < 5; k++) if (i & (1 << k)) r |= 1 << (4 - k);
    return r;
  endfunction

  function automatic word_t cmul(word_t x, int k);
    longint are = longint'(int'(x[63:32])), aim = longint'(int'(x[31:0]));
    longint bre = longint'(wre[k]), bim = longint'(wim[k]);
    return {32'((are*bre - aim*bim) >>> 15), 32'((are*bim + aim*bre) >>> 15)};
  endfunction

  task automatic host_write(int a, word_t d);
    @(negedge clk); host_en = 1; host_we = 1; host_addr = AW'(a); host_wdata = d;
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic host_read(int a, output word_t d);
    @(negedge clk); host_en = 1; host_addr = AW'(a); #1 d = host_rdata;
    @(negedge clk); host_en = 0;
  endtask

  // runs the loaded program on x (natural order), returns the memory result
  // and the integer-model result
  task automatic run_fft(input word_t x [N], output word_t got [N], output word_t expv [N]);
    word_t m [N];
    for (int i = 0; i < N; i++) begin
      m[i] = x[bitrev5(i)];
      host_write(XB + i, m[i]);
    end
    for (int s = 0; s < 5; s++) begin
      int half = 1 << s;
      for (int g = 0; g < N; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          word_t t, a;
          t = cmul(m[g + j + half], j * (N / (2 * half)));
          a = m[g + j];
          m[g + j]        = {a[63:32] + t[63:32], a[31:0] + t[31:0]};
          m[g + j + half] = {a[63:32] - t[63:32], a[31:0] - t[31:0]};
        end
    end
    expv = m;
    run_cycles = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    for (int i = 0; i < N; i++) host_read(XB + i, got[i]);
  endtask

  // ---- list scheduler for the scheduled program
  localparam int MAXB = 400;
  logic [31:0] sched_ins [MAXB][2];
  bit          sched_used [MAXB][2];
  int          wr_at [64], rd_at [64];
  int          last_mem, n_bundles;

  task automatic sched_reset();
    for (int b = 0; b < MAXB; b++) begin
      sched_used[b] = '{0, 0};
      sched_ins[b]  = '{enc_nop(), enc_nop()};
    end
    for (int r = 0; r < 64; r++) begin wr_at[r] = -1; rd_at[r] = -1; end
    last_mem = -1;
    n_bundles = 0;
  endtask

  // place one operation; rs/ws list the registers read/written (-1 = none)
  task automatic sched(logic [31:0] ins, bit mem, int rs [4], int ws [2]);
    int e, b, sl;
    e = 0;
    for (int i = 0; i < 4; i++) if (rs[i] >= 0) e = (wr_at[rs[i]] + 1 > e) ? wr_at[rs[i]] + 1 : e;
    for (int i = 0; i < 2; i++) if (ws[i] >= 0) begin
      if (wr_at[ws[i]] + 1 > e) e = wr_at[ws[i]] + 1;
      if (rd_at[ws[i]] > e)     e = rd_at[ws[i]];
    end
    if (mem && last_mem + 1 > e) e = last_mem + 1;
    b = e; sl = -1;
    while (sl < 0) begin
      if (!sched_used[b][0]) sl = 0;
      else if (!mem && !sched_used[b][1]) sl = 1;
      else b++;
    end
    sched_used[b][sl] = 1;
    sched_ins[b][sl]  = ins;
    for (int i = 0; i < 4; i++) if (rs[i] >= 0 && b > rd_at[rs[i]]) rd_at[rs[i]] = b;
    for (int i = 0; i < 2; i++) if (ws[i] >= 0) wr_at[ws[i]] = b;
    if (mem) last_mem = b;
    if (b + 1 > n_bundles) n_bundles = b + 1;
  endtask

  // one butterfly pair: part 0 is the two X2 loads, part 1 the rest.
  // Stage 1 (span 1) pairs butterflies 4q and 4q+2, whose operands share a
  // word pair; the adds and subtracts there are single. Later stages pair
  // butterflies j and j+1, neighbours in memory, and use X2 adds/subtracts.
  task automatic emit_pair(int s, int q, int p, int part);
    int half, g, j, a, bb, t, o, u, ia, ib, k0, k1;
    half = 1 << s;
    a = 2 + 10 * (p % 4); bb = a + 2; t = a + 4; o = a + 6; u = a + 8;
    if (s == 0) begin
      ia = XB + 4 * q; ib = ia + 2;
      if (part == 0) begin
        sched(enc_lda(6'(a), AW'(ia), 1'b1), 1, '{-1, -1, -1, -1}, '{a, a + 1});
        sched(enc_lda(6'(bb), AW'(ib), 1'b1), 1, '{-1, -1, -1, -1}, '{bb, bb + 1});
      end else begin
        sched(enc_cmu(6'(t), 6'(a + 1), 6'(TWR), 1'b0), 0, '{a + 1, TWR, -1, -1}, '{t, -1});
        sched(enc_cmu(6'(t + 1), 6'(bb + 1), 6'(TWR), 1'b0), 0, '{bb + 1, TWR, -1, -1}, '{t + 1, -1});
        sched(enc_alu(OP_ADD, SZ32, 6'(o), 6'(a), 6'(t)), 0, '{a, t, -1, -1}, '{o, -1});
        sched(enc_alu(OP_SUB, SZ32, 6'(o + 1), 6'(a), 6'(t)), 0, '{a, t, -1, -1}, '{o + 1, -1});
        sched(enc_alu(OP_ADD, SZ32, 6'(u), 6'(bb), 6'(t + 1)), 0, '{bb, t + 1, -1, -1}, '{u, -1});
        sched(enc_alu(OP_SUB, SZ32, 6'(u + 1), 6'(bb), 6'(t + 1)), 0, '{bb, t + 1, -1, -1}, '{u + 1, -1});
        sched(enc_sta(6'(o), AW'(ia), 1'b1), 1, '{o, o + 1, -1, -1}, '{-1, -1});
        sched(enc_sta(6'(u), AW'(ib), 1'b1), 1, '{u, u + 1, -1, -1}, '{-1, -1});
      end
    end else begin
      g = (2 * q / half) * 2 * half;   // group start
      j = (2 * q) % half;              // even butterfly index in the group
      ia = XB + g + j; ib = ia + half;
      k0 = j * (N / (2 * half)); k1 = (j + 1) * (N / (2 * half));
      if (part == 0) begin
        sched(enc_lda(6'(a), AW'(ia), 1'b1), 1, '{-1, -1, -1, -1}, '{a, a + 1});
        sched(enc_lda(6'(bb), AW'(ib), 1'b1), 1, '{-1, -1, -1, -1}, '{bb, bb + 1});
      end else begin
        sched(enc_cmu(6'(t), 6'(bb), 6'(TWR + k0 / 2), 1'(k0 % 2)), 0,
              '{bb, TWR + k0 / 2, -1, -1}, '{t, -1});
        sched(enc_cmu(6'(t + 1), 6'(bb + 1), 6'(TWR + k1 / 2), 1'(k1 % 2)), 0,
              '{bb + 1, TWR + k1 / 2, -1, -1}, '{t + 1, -1});
        sched(enc_alu(OP_ADD, SZ32, 6'(o), 6'(a), 6'(t), 1'b1), 0, '{a, a + 1, t, t + 1}, '{o, o + 1});
        sched(enc_alu(OP_SUB, SZ32, 6'(u), 6'(a), 6'(t), 1'b1), 0, '{a, a + 1, t, t + 1}, '{u, u + 1});
        sched(enc_sta(6'(o), AW'(ia), 1'b1), 1, '{o, o + 1, -1, -1}, '{-1, -1});
        sched(enc_sta(6'(u), AW'(ib), 1'b1), 1, '{u, u + 1, -1, -1}, '{-1, -1});
      end
    end
  endtask

  // the scheduled FFT: twiddle word i in register TWR+i, rotating
  // ten-register sets per butterfly pair
  localparam int TWR = 48;
  task automatic build_sched();
    int p;
    sched_reset();
    for (int i = 0; i < N / 8; i++)
      sched(enc_lda(6'(TWR + 2*i), AW'(TB + 2*i), 1'b1), 1, '{-1, -1, -1, -1}, '{TWR + 2*i, TWR + 2*i + 1});
    // within a stage the loads of the next pair are issued before the
    // stores of the current one; a stage starts after the last store of
    // the stage before it
    p = 0;
    for (int s = 0; s < 5; s++) begin
      for (int q = 0; q < N / 4; q++) begin
        if (q == 0) emit_pair(s, 0, p, 0);
        if (q + 1 < N / 4) emit_pair(s, q + 1, p + 1, 0);
        emit_pair(s, q, p, 1);
        p++;
      end
    end
    sched_used[n_bundles][0] = 1;
    sched_ins[n_bundles][0]  = enc_halt();
    n_bundles++;
  endtask

  initial begin
    int pc;
    word_t x [N], got [N], expv [N];
    for (int k = 0; k < N / 2; k++) begin
      wre[k] = 16'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
      wim[k] = 16'($rtoi($floor(-32767.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    end

    // ---- program: straight-line radix-2 DIT
    #12 rst_n = 1;
    pc = 0;
    for (int s = 0; s < 5; s++) begin
      int half;
      half = 1 << s;
      for (int g = 0; g < N; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          int ia, ib, k;
          logic [63:0] bund [7];
          ia = XB + g + j;
          ib = XB + g + j + half;
          k = j * (N / (2 * half));
          bund[0] = {32'd0, enc_lda(0, AW'(ia))};
          bund[1] = {32'd0, enc_lda(1, AW'(ib))};
          bund[2] = {32'd0, enc_lda(2, AW'(TB + k / 2))};
          bund[3] = {enc_cmu(3, 1, 2, 1'(k % 2)), enc_nop()};
          bund[4] = {enc_alu(OP_ADD, SZ32, 4, 0, 3), enc_alu(OP_SUB, SZ32, 5, 0, 3)};
          bund[5] = {32'd0, enc_sta(4, AW'(ia))};
          bund[6] = {32'd0, enc_sta(5, AW'(ib))};
          for (int q = 0; q < 7; q++) begin
            @(negedge clk); prog_we = 1; prog_addr = 10'(pc); prog_data = bund[q]; pc++;
          end
        end
    end
    @(negedge clk); prog_we = 1; prog_addr = 10'(pc); prog_data = {32'd0, enc_halt()}; pc++;
    @(negedge clk); prog_we = 0;
    // twiddles: W^(2i) low, W^(2i+1) high
    for (int i = 0; i < N / 4; i++)
      host_write(TB + i, {wre[2*i+1], wim[2*i+1], wre[2*i], wim[2*i]});

    // ---- random input, bit-exact
    for (int i = 0; i < N; i++) x[i] = {32'(int'($urandom % 2000000) - 1000000), 32'(int'($urandom % 2000000) - 1000000)};
    run_fft(x, got, expv);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] !== expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d: got %h expected %h", i, got[i], expv[i]);
      end
    end
    checks++;
    if (run_cycles != pc) begin failures++; $display("FAIL cycles %0d, expected %0d", run_cycles, pc); end
    checks++;
    if (n_cmu != 80) begin failures++; $display("FAIL %0d complex multiplies, expected 80", n_cmu); end

    // ---- cosine at bin 3: energy in bins 3 and 29 only
    for (int i = 0; i < N; i++)
      x[i] = {32'($rtoi(10000.0 * $cos(2.0 * 3.14159265358979 * 3 * i / N))), 32'd0};
    run_fft(x, got, expv);
    for (int i = 0; i < N; i++) begin
      real re, im, mag;
      re = real'(int'(got[i][63:32]));
      im = real'(int'(got[i][31:0]));
      mag = $sqrt(re * re + im * im);
      checks++;
      if ((i == 3 || i == 29) ? (mag < 159000.0 || mag > 161000.0) : (mag > 100.0)) begin
        failures++;
        $display("FAIL tone bin %0d magnitude %f", i, mag);
      end
    end
    $display("FFT cycles (straight-line, unscheduled): %0d", pc);

    // ---- scheduled program on random input, bit-exact
    build_sched();
    for (int b = 0; b < n_bundles; b++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(b); prog_data = {sched_ins[b][1], sched_ins[b][0]};
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < N; i++) x[i] = {32'(int'($urandom % 2000000) - 1000000), 32'(int'($urandom % 2000000) - 1000000)};
    n_cmu = 0;
    run_fft(x, got, expv);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] !== expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL scheduled bin %0d: got %h expected %h", i, got[i], expv[i]);
      end
    end
    checks++;
    if (run_cycles != n_bundles) begin failures++; $display("FAIL scheduled cycles %0d, expected %0d", run_cycles, n_bundles); end
    checks++;
    if (n_cmu == 0 || n_bundles >= pc / 2) begin
      failures++; $display("FAIL scheduled program: %0d bundles, %0d CMU cycles", n_bundles, n_cmu);
    end
    $display("FFT cycles (scheduled, both slots and X2): %0d", run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 40000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
