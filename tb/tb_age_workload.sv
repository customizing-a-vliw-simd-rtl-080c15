// tb_age_workload: the adaptive gain equalizer (AGE) noise-reduction step
// for the 17 subbands of one 8-sample block, run as a program on the full
// system at its default sizes, for several consecutive blocks.
//
// Per subband k the program computes
//   |x_k|      = sqrt(|x_k|^2)                    (square-root co-processor, #16)
//   A_k        = A_k - A_k/4 + |x_k|/4             (short-term average, alpha = 1/4)
//   floor_k    = A_k > floor_k ? floor_k + floor_k/64 : A_k   (CS/CR, beta = 1/64)
//   g_k        = min(1, A_k / (2 * floor_k))        (DCU with #4, CS/CR limit)
// with the squared magnitudes given as 64-bit inputs. A_k and floor_k
// persist in data memory across blocks. The testbench runs the same
// recursion in integers and compares all 51 results per block, and checks
// that every block takes the same number of cycles (data-independent
// co-processor latency).
module tb_age_workload;
  import asip_pkg::*;

  localparam int NB = 17;   // subbands
  localparam int NBLK = 4;  // blocks

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

  logic [63:0] prog [64];
  int checks = 0, failures = 0, cycles = 0, run_cycles = 0;

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
  end

  function automatic logic [15:0] ref_div(logic [31:0] a, logic [31:0] d);
    logic [63:0] q;
    if (d == 0) return 16'hFFFF;
    q = (64'(a) << 15) / 64'(d);
    return (q > 64'hFFFF) ? 16'hFFFF : q[15:0];
  endfunction
  function automatic logic [31:0] ref_isqrt(logic [63:0] v);
    logic [31:0] r = 0;
    for (int i = 31; i >= 0; i--) begin
      logic [31:0] t;
      t = r | (32'd1 << i);
      if (64'(t) * 64'(t) <= v) r = t;
    end
    return r;
  endfunction

  task automatic host_write(int a, word_t d);
    @(negedge clk); host_en = 1; host_we = 1; host_addr = AW'(a); host_wdata = d;
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic host_read(int a, output word_t d);
    @(negedge clk); host_en = 1; host_addr = AW'(a); #1 d = host_rdata;
    @(negedge clk); host_en = 0;
  endtask
  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] b(logic [31:0] s0, logic [31:0] s1 = 32'd0);
    return {s1, s0};
  endfunction

  initial begin
    logic [31:0] A [NB], F [NB];
    logic [63:0] x2 [NB];
    int blk_cycles [NBLK];
    for (int i = 0; i < 64; i++) prog[i] = '0;
    prog[0]  = b(enc_smvi(SR_APTR0, 16'd0),       enc_mvi(SZ64, 20, 14'(NB)));
    prog[1]  = b(enc_smvi(SR_APTR0 + 1, 16'd32));
    prog[2]  = b(enc_smvi(SR_APTR0 + 3, 16'd64));
    prog[3]  = b(enc_smvi(SR_APTR0 + 5, 16'd96),  enc_mvi(SZ32, 17, 14'd1));
    prog[4]  = b(enc_nop(),                       enc_alui(OP_SHL, SZ32, 17, 17, 8'sd15));
    prog[5]  = b(enc_nop(),                       enc_alui(OP_SUB, SZ32, 19, 17, 8'sd1));
    // loop over subbands
    prog[6]  = b(enc_ldp(0, 0, 1));
    prog[7]  = b(enc_stcop(COP_SQRT, 0, 6'd16));
    prog[8]  = b(enc_ldp(2, 1, 0));
    prog[9]  = b(enc_ldp(3, 3, 0));
    prog[10] = b(enc_nop(),                       enc_alui(OP_SHR, SZ32, 4, 2, 8'sd2));
    prog[11] = b(enc_nop(),                       enc_alu(OP_SUB, SZ32, 5, 2, 4));
    // 12..23: the square root iterates
    prog[24] = b(enc_ldcop(1, COP_SQRT));
    prog[25] = b(enc_nop(),                       enc_alui(OP_SHR, SZ32, 6, 1, 8'sd2));
    prog[26] = b(enc_nop(),                       enc_alu(OP_ADD, SZ32, 2, 5, 6));
    prog[27] = b(enc_smvi(SR_CONDSEL, 16'(COND_NEG)), enc_alu(OP_SUB, SZ32, 7, 3, 2, 0, 1, 0));
    prog[28] = b(enc_stp(2, 1, 1),                enc_alui(OP_SHR, SZ32, 8, 3, 8'sd6));
    prog[29] = b(enc_nop(),                       enc_alu(OP_ADD, SZ32, 8, 3, 8));
    prog[30] = b(enc_smvi(SR_CONDSEL, 16'(COND_NNEG)), enc_alu(OP_MV, SZ32, 3, 8, 0, 0, 0, 1));
    prog[31] = b(enc_nop(),                       enc_alu(OP_MV, SZ32, 3, 2, 0, 0, 0, 1));
    prog[32] = b(enc_stp(3, 3, 1),                enc_alui(OP_SHL, SZ32, 9, 3, 8'sd1));
    prog[33] = b(enc_stcop(COP_DCU_A, 2, 6'd0));
    prog[34] = b(enc_stcop(COP_DCU_B, 9, 6'd4));
    prog[35] = b(enc_nop(),                       enc_alui(OP_SUB, SZ64, 20, 20, 8'sd1));
    // 36..38: the DCU's #4 delay
    prog[39] = b(enc_ldcop(10, COP_DCU_A));
    prog[40] = b(enc_nop(),                       enc_alu(OP_SUB, SZ32, 11, 10, 17, 0, 1, 0));
    prog[41] = b(enc_nop(),                       enc_alu(OP_MV, SZ32, 10, 19, 0, 0, 0, 1));
    prog[42] = b(enc_stp(10, 5, 1));
    prog[43] = b(enc_br(BR_NZERO, 20, 6));
    prog[44] = b(enc_halt());

    #12 rst_n = 1;
    for (int i = 0; i < 45; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    for (int k = 0; k < NB; k++) begin
      A[k] = 32'd4000 + 32'($urandom % 1000);
      F[k] = 32'd3000 + 32'($urandom % 1000);
      host_write(32 + k, 64'(A[k]));
      host_write(64 + k, 64'(F[k]));
    end

    for (int blk = 0; blk < NBLK; blk++) begin
      for (int k = 0; k < NB; k++) begin
        // speech-like activity in some bands and blocks, quiet elsewhere
        logic [31:0] mag;
        mag = ((k + blk) % 3 == 0) ? 32'd20000 + 32'($urandom % 40000) : 32'($urandom % 3000);
        x2[k] = 64'(mag) * 64'(mag) + 64'($urandom % 100);
        host_write(k, x2[k]);
      end
      run_cycles = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (!running);
      blk_cycles[blk] = run_cycles;
      for (int k = 0; k < NB; k++) begin
        logic [31:0] m, fn;
        logic [15:0] q;
        word_t got;
        m = ref_isqrt(x2[k]);
        A[k] = A[k] - (A[k] >> 2) + (m >> 2);
        fn = (int'(F[k] - A[k]) < 0) ? F[k] + (F[k] >> 6) : A[k];
        F[k] = fn;
        q = ref_div(A[k], F[k] << 1);
        host_read(32 + k, got); chk($sformatf("A[%0d] block %0d", k, blk), got, 64'(A[k]));
        host_read(64 + k, got); chk($sformatf("floor[%0d] block %0d", k, blk), got, 64'(F[k]));
        host_read(96 + k, got);
        chk($sformatf("gain[%0d] block %0d", k, blk), got, 64'((q >= 16'h8000) ? 16'h7FFF : q));
      end
      checks++;
      if (blk_cycles[blk] != 45 + (NB - 1) * 38) begin
        failures++;
        $display("FAIL block %0d took %0d cycles, expected %0d", blk, blk_cycles[blk], 45 + (NB - 1) * 38);
      end
    end
    $display("AGE cycles per 8-sample block (17 subbands): %0d", blk_cycles[0]);
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
