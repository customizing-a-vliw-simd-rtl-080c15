// tb_simd_alu: random self-check of the SIMD ALU against a subword-by-
// subword reference written with plain integer arithmetic: add/sub results
// and Z/N/C/V flags, logic ops, shifts, MIXL/MIXR, for all four subword
// sizes, plus conditional (CR) merging under each condition.
module tb_simd_alu;
  import asip_pkg::*;

  alu_op_e  op;
  size_e    sz;
  word_t    a, b, old, res;
  logic     cr;
  cond_e    cnd;
  flagvec_t fin, fout;
  int checks = 0, failures = 0;

  simd_alu dut (.op_i(op), .size_i(sz), .a_i(a), .b_i(b), .old_i(old), .cr_i(cr),
                .cond_i(cnd), .flags_i(fin), .res_o(res), .flags_o(fout));

  function automatic int unsigned wid(size_e s);
    return 8 << s;
  endfunction

  // reference: result and the flags of every subword, copied to its bytes
  task automatic ref_op(input alu_op_e o, input size_e s, input word_t x, input word_t y,
                        output word_t r, output flagvec_t f);
    int unsigned w = wid(s);
    logic [64:0] m = (w == 64) ? 65'h0_FFFF_FFFF_FFFF_FFFF : ((65'd1 << w) - 1);
    r = '0;
    f = '0;
    for (int k = 0; k < 64 / int'(w); k++) begin
      logic [64:0] xv, yv, t;
      logic [63:0] sx;
      logic        c, v;
      int unsigned sh;
      xv = (65'(x) >> (k * w)) & m;
      yv = (65'(y) >> (k * w)) & m;
      sh = int'(yv) % w;
      c = 0; v = 0;
      case (o)
        ALU_ADD: begin t = xv + yv; c = t[w]; v = (xv[w-1] == yv[w-1]) && (t[w-1] != xv[w-1]); end
        ALU_SUB: begin t = xv + ((~yv) & m) + 1; c = t[w]; v = (xv[w-1] != yv[w-1]) && (t[w-1] != xv[w-1]); end
        ALU_AND: t = xv & yv;
        ALU_OR:  t = xv | yv;
        ALU_XOR: t = xv ^ yv;
        ALU_SHL: t = xv << sh;
        ALU_SHR: t = xv >> sh;
        ALU_SRA: begin
          sx = 64'(xv);
          if (xv[w-1]) sx = sx | ~64'(m);
          t = 65'($signed(sx) >>> sh);
        end
        ALU_PASSB: t = yv;
        default: t = 0;
      endcase
      t = t & m;
      r = r | (64'(t) << (k * w));
      for (int i = 0; i < int'(w) / 8; i++) begin
        f[k * w / 8 + i].z = (t == 0);
        f[k * w / 8 + i].n = t[w-1];
        f[k * w / 8 + i].c = c;
        f[k * w / 8 + i].v = v;
      end
    end
  endtask

  function automatic word_t ref_mix(bit left, size_e s, word_t x, word_t y);
    int unsigned w = wid(s);
    word_t r = '0;
    word_t m = (64'd1 << w) - 1;
    for (int j = 0; j < 32 / int'(w); j++) begin
      int unsigned hi = (2*j+1) * w, lo = 2*j * w;
      word_t xe = left ? (x >> hi) & m : (x >> lo) & m;
      word_t ye = left ? (y >> hi) & m : (y >> lo) & m;
      r = r | (xe << hi) | (ye << lo);
    end
    return r;
  endfunction

  function automatic word_t rnd64();
    return {$urandom, $urandom};
  endfunction

  word_t    er;
  flagvec_t ef;
  alu_op_e  ops[9] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHR, ALU_SRA, ALU_PASSB};

  initial begin
    cr = 0; cnd = COND_ALWAYS; fin = '0; old = '0;
    for (int n = 0; n < 4000; n++) begin
      op = ops[$urandom % 9];
      sz = size_e'($urandom % 4);
      a = rnd64(); b = rnd64();
      if (n % 5 == 0) b = a;              // zero results on subtract
      if (n % 7 == 0) a = ~b;              // all-ones sums, carries
      #1;
      ref_op(op, sz, a, b, er, ef);
      checks++;
      if (res !== er || ((op == ALU_ADD || op == ALU_SUB) && fout !== ef) ||
          (op != ALU_ADD && op != ALU_SUB && (res !== er))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s sz=%0d a=%h b=%h res=%h exp=%h f=%h ef=%h",
                                    op.name(), sz, a, b, res, er, fout, ef);
      end
      if (op != ALU_ADD && op != ALU_SUB) begin
        checks++;
        for (int i = 0; i < 8; i++)
          if (fout[i].z !== ef[i].z || fout[i].n !== ef[i].n) begin
            failures++;
            break;
          end
      end
    end
    // MIX
    for (int n = 0; n < 200; n++) begin
      sz = size_e'($urandom % 3);
      a = rnd64(); b = rnd64();
      op = ALU_MIXL; #1; checks++;
      if (res !== ref_mix(1, sz, a, b)) begin failures++; $display("FAIL MIXL %h", res); end
      op = ALU_MIXR; #1; checks++;
      if (res !== ref_mix(0, sz, a, b)) begin failures++; $display("FAIL MIXR %h", res); end
    end
    // CR: flags from one operation steer a later one, per subword
    for (int n = 0; n < 800; n++) begin
      word_t fa, fb, full;
      flagvec_t fl;
      sz = size_e'($urandom % 4);
      fa = rnd64(); fb = rnd64();
      for (int i = 0; i < 8; i++) if ($urandom % 2) fb[8*i +: 8] = fa[8*i +: 8];
      ref_op(ALU_SUB, sz, fa, fb, er, fl);
      fin = fl;
      cnd = cond_e'($urandom % 8);
      cr = 1; op = ALU_ADD;
      a = rnd64(); b = rnd64(); old = rnd64();
      #1;
      ref_op(ALU_ADD, sz, a, b, full, ef);
      for (int i = 0; i < 8; i++)
        if (!cond_true(cnd, fl[i])) full[8*i +: 8] = old[8*i +: 8];
      checks++;
      if (res !== full) begin
        failures++;
        if (failures < 10) $display("FAIL CR cnd=%0d res=%h exp=%h", cnd, res, full);
      end
    end
    // the document's example: add only where the 8-bit subword of R0 is zero
    sz = SZ8; cr = 0; op = ALU_SUB; a = 64'h00_11_00_22_00_00_33_00; b = 0; #1;
    fin = fout; cr = 1; cnd = COND_ZERO; op = ALU_ADD;
    a = 64'h0101010101010101; b = 64'h0202020202020202; old = 64'hEEEEEEEEEEEEEEEE; #1;
    checks++;
    if (res !== 64'h03_EE_03_EE_03_03_EE_03) begin failures++; $display("FAIL example %h", res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
