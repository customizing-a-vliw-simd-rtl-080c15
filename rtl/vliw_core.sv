// vliw_core: one dual-issue VLIW-SIMD vector unit with a minimal pipeline.
//
// Each cycle the core executes one 64-bit bundle of two 32-bit instructions
// (slot 0 in bits 31:0, slot 1 in bits 63:32). The pipeline is cut down to
// two steps, as in the document's low-power "minimal pipeline"
// configuration: a fetch step (the synchronous instruction-memory read) and
// a single RA/EX step that decodes, reads the register file, executes and
// writes back within the same cycle. The next fetch address is computed in
// RA/EX, so a taken branch costs no cycle. There are no interlocks: the
// static scheduler must respect the co-processor delays, exactly as in the
// document's delayed-load scheme.
//
// Parallelism: two issue slots, each with two execution lanes (exec_lane).
// An X2 instruction occupies one slot but runs on both lanes, on registers
// that differ only in their last address bit, so up to four operations
// finish per cycle. All arithmetic is 64-bit SIMD with 8/16/32/64-bit
// subwords. CS stores per-subword flags, CR executes per subword under the
// condition in the CONDSEL special register.
//
// Slot 0 is also the load/store and control slot: pointer loads/stores with
// post-increment through eight address pointers with circular-buffer masks
// (circ_addr), absolute loads/stores, co-processor loads/stores, SMVI,
// branches and HALT. Slot 1 runs arithmetic only; control and memory
// opcodes there act as NOP. This split, the instruction encoding (see
// asip_pkg), flag sharing (one flag register, slot 1 over slot 0, lane 0's
// flags) and write priority (slot 1 over slot 0) are this design's choices.
//
// Interface: start_i (pulse) begins execution at bundle 0; running_o falls
// after HALT. events_o pulses what each executed bundle did.
module vliw_core
  import asip_pkg::*;
#(
  parameter int unsigned IAW = 10    // instruction memory address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  output logic              running_o,
  // instruction memory
  output logic [IAW-1:0]    imem_addr_o,
  input  logic [63:0]       imem_rdata_i,
  // data memory, port A
  output logic [AW-1:0]     dmem_addr_o,
  output logic              dmem_pair_o,
  output logic              dmem_we_o,
  output word_t [1:0]       dmem_wdata_o,
  input  word_t [1:0]       dmem_rdata_i,
  // co-processor port
  output logic              cop_we_o,
  output logic [CAW-1:0]    cop_addr_o,
  output word_t             cop_wdata_o,
  output logic [5:0]        cop_iters_o,
  input  word_t             cop_rdata_i,
  output events_t           events_o
);

  // ------------------------------------------------------------ state
  logic            running_q, valid_q;
  logic [PCW-1:0]  pc_q;
  flagvec_t        flags_q;
  cond_e           condsel_q;
  logic [AW-1:0]   aptr_q  [NAPTR];
  logic [AW-1:0]   amask_q [NAPTR];

  // ------------------------------------------------------------ decode
  logic [1:0][31:0] ins;
  opcode_e [1:0]    op;
  logic [1:0]       x2, cs, cr, imm_en;
  size_e [1:0]      sz;
  logic [1:0][5:0]  rd_f, ra_f, rb_f, ro_f;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      ins[s]    = valid_q ? imem_rdata_i[32*s +: 32] : 32'd0;
      op[s]     = opcode_e'(ins[s][31:26]);
      // slot 1 runs arithmetic only
      if (s == 1 && ins[s][31:26] >= 6'd24) op[s] = OP_NOP;
      x2[s]     = ins[s][25];
      sz[s]     = size_e'(ins[s][24:23]);
      cs[s]     = ins[s][22];
      cr[s]     = ins[s][21];
      imm_en[s] = ins[s][20];
      rd_f[s]   = (op[s] == OP_LDCOP) ? ins[s][25:20] : ins[s][19:14];
      ra_f[s]   = (op[s] == OP_BR)    ? ins[s][25:20] : ins[s][13:8];
      rb_f[s]   = ins[s][7:2];
      ro_f[s]   = (op[s] == OP_STCOP) ? ins[s][25:20] : ins[s][19:14];
    end
  end

  // ------------------------------------------------------------ register file
  logic  [5:0][5:0] rf_raddr;
  word_t [5:0][1:0] rf_rdata;
  logic  [3:0]      rf_we;
  logic  [3:0][5:0] rf_waddr;
  word_t [3:0]      rf_wdata;

  always_comb
    for (int s = 0; s < 2; s++) begin
      rf_raddr[3*s]   = ra_f[s];
      rf_raddr[3*s+1] = rb_f[s];
      rf_raddr[3*s+2] = ro_f[s];
    end

  x2_regfile #(.NREG(64), .NRP(6), .NWP(4)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .raddr_i (rf_raddr),
    .rdata_o (rf_rdata),
    .we_i    (rf_we),
    .waddr_i (rf_waddr),
    .wdata_i (rf_wdata)
  );

  // ------------------------------------------------------------ execution lanes
  logic  [1:0][1:0] ln_we;
  word_t [1:0][1:0] ln_res, ln_hi;
  flagvec_t [1:0][1:0] ln_flags;

  for (genvar s = 0; s < 2; s++) begin : g_slot
    for (genvar l = 0; l < 2; l++) begin : g_lane
      exec_lane u_lane (
        .lane1_i  (1'(l)),
        .op_i     (op[s]),
        .size_i   (sz[s]),
        .cr_i     (cr[s]),
        .imm_en_i (imm_en[s]),
        .imm8_i   (ins[s][7:0]),
        .imm14_i  (ins[s][13:0]),
        .cmu_hi_i (ins[s][0]),
        .a_i      (rf_rdata[3*s][l]),
        .b_i      (rf_rdata[3*s+1][l]),
        .old_i    (rf_rdata[3*s+2][l]),
        .old_hi_i (rf_rdata[3*s+2][1-l]),
        .cond_i   (condsel_q),
        .flags_i  (flags_q),
        .we_o     (ln_we[s][l]),
        .res_o    (ln_res[s][l]),
        .acc_hi_o (ln_hi[s][l]),
        .flags_o  (ln_flags[s][l])
      );
    end
  end

  // ------------------------------------------------------------ slot 0 memory and control
  logic [2:0]      ap;
  logic [AW-1:0]   ap_next;
  logic            ap_wrap;
  logic            is_ldp, is_stp, is_lda, is_sta, is_ld, is_st, mem_x2;
  logic            br_taken;
  logic [31:0]     br_val;

  assign ap = ins[0][10:8];
  assign is_ldp = (op[0] == OP_LDP);
  assign is_stp = (op[0] == OP_STP);
  assign is_lda = (op[0] == OP_LDA);
  assign is_sta = (op[0] == OP_STA);
  assign is_ld  = is_ldp || is_lda;
  assign is_st  = is_stp || is_sta;
  assign mem_x2 = x2[0];

  circ_addr #(.AW(AW)) u_circ (
    .addr_i (aptr_q[ap]),
    .mask_i (amask_q[ap]),
    .step_i (mem_x2 ? 2'd2 : 2'd1),
    .addr_o (ap_next),
    .wrap_o (ap_wrap)
  );

  always_comb begin
    dmem_addr_o  = (is_ldp || is_stp) ? aptr_q[ap] : ins[0][AW-1:0];
    dmem_pair_o  = mem_x2;
    dmem_we_o    = is_st;
    dmem_wdata_o = {rf_rdata[2][1], rf_rdata[2][0]};
    cop_we_o     = (op[0] == OP_STCOP);
    cop_addr_o   = ins[0][19:10];
    cop_wdata_o  = rf_rdata[2][0];
    cop_iters_o  = ins[0][5:0];
    br_val       = rf_rdata[0][0][31:0];
    unique case (brcond_e'(ins[0][19:18]))
      BR_ALWAYS: br_taken = (op[0] == OP_BR);
      BR_ZERO:   br_taken = (op[0] == OP_BR) && (br_val == 32'd0);
      BR_NZERO:  br_taken = (op[0] == OP_BR) && (br_val != 32'd0);
      default:   br_taken = 1'b0;
    endcase
  end

  // ------------------------------------------------------------ write back
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      for (int l = 0; l < 2; l++) begin
        rf_waddr[2*s+l] = rd_f[s] ^ 6'(l);
        rf_wdata[2*s+l] = ln_res[s][l];
        rf_we[2*s+l]    = ln_we[s][l] && (l == 0 || x2[s]);
      end
      // MAC_16 writes both accumulators from lane 0
      if (op[s] == OP_MAC16) begin
        rf_we[2*s+1]    = 1'b1;
        rf_wdata[2*s+1] = ln_hi[s][0];
      end
    end
    if (is_ld) begin
      rf_we[0]    = 1'b1;
      rf_wdata[0] = dmem_rdata_i[0];
      rf_we[1]    = mem_x2;
      rf_wdata[1] = dmem_rdata_i[1];
    end
    if (op[0] == OP_LDCOP) begin
      rf_we[0]    = 1'b1;
      rf_wdata[0] = cop_rdata_i;
    end
  end

  // ------------------------------------------------------------ sequencing
  logic [PCW-1:0] next_pc;
  logic           halt;

  assign halt    = (op[0] == OP_HALT);
  assign next_pc = br_taken ? ins[0][PCW-1:0] : pc_q + 1'b1;
  assign imem_addr_o = (valid_q && !halt) ? IAW'(next_pc) : '0;
  assign running_o   = running_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      valid_q   <= 1'b0;
      pc_q      <= '0;
      flags_q   <= '0;
      condsel_q <= COND_ALWAYS;
      for (int i = 0; i < int'(NAPTR); i++) begin
        aptr_q[i]  <= '0;
        amask_q[i] <= '0;
      end
    end else begin
      if (!running_q) begin
        if (start_i) begin
          running_q <= 1'b1;
          valid_q   <= 1'b1;
          pc_q      <= '0;
        end
      end else if (valid_q) begin
        if (halt) begin
          running_q <= 1'b0;
          valid_q   <= 1'b0;
        end
        pc_q <= next_pc;
        // flags: slot 1 over slot 0, lane 0's flags
        if (cs[0] && ln_we[0][0]) flags_q <= ln_flags[0][0];
        if (cs[1] && ln_we[1][0]) flags_q <= ln_flags[1][0];
        if (is_ldp || is_stp) begin
          if (ins[0][7]) aptr_q[ap] <= ap_next;
        end
        if (op[0] == OP_SMVI) begin
          if (ins[0][21:16] == SR_CONDSEL) condsel_q <= cond_e'(ins[0][2:0]);
          for (int i = 0; i < int'(NAPTR); i++) begin
            if (ins[0][21:16] == SR_APTR0 + 6'(i))  aptr_q[i]  <= AW'(ins[0][15:0]);
            if (ins[0][21:16] == SR_AMASK0 + 6'(i)) amask_q[i] <= AW'(ins[0][15:0]);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ program rules
  // slot 1 carries arithmetic only; a memory or control opcode there is a
  // scheduling error (it is executed as NOP)
  property p_slot1_arith;
    @(posedge clk) disable iff (!rst_n) valid_q |-> imem_rdata_i[63:58] < 6'd24;
  endproperty
  assert property (p_slot1_arith) else $error("memory/control opcode in slot 1");

  // ------------------------------------------------------------ events
  always_comb begin
    events_o           = '0;
    events_o.bundle    = valid_q;
    events_o.x2        = (x2[0] && (ln_we[0][0] || is_ld || is_st)) || (x2[1] && ln_we[1][0]);
    events_o.cs        = (cs[0] && ln_we[0][0]) || (cs[1] && ln_we[1][0]);
    events_o.cr        = (cr[0] && ln_we[0][0]) || (cr[1] && ln_we[1][0]);
    events_o.mac       = (op[0] == OP_MAC16) || (op[1] == OP_MAC16);
    events_o.cmu       = (op[0] == OP_CMU) || (op[1] == OP_CMU);
    events_o.clz       = (op[0] == OP_CLZ) || (op[1] == OP_CLZ);
    events_o.wrap      = (is_ldp || is_stp) && ins[0][7] && ap_wrap;
    events_o.branch    = br_taken;
    events_o.cop_start = cop_we_o && (cop_addr_o == COP_DCU_B || cop_addr_o == COP_SQRT ||
                                      cop_addr_o == COP_DMA_CTRL);
  end

endmodule
