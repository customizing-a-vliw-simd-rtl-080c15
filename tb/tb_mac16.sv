// tb_mac16: random self-check of MAC_16. Four signed 16x16 products are
// accumulated into four 32-bit lanes of a register pair; the reference
// works on integers and wraps to 32 bits. Also runs a 32-step windowed
// dot product (La = 128 taps, four per MAC_16) and checks the four sums.
module tb_mac16;
  import asip_pkg::*;
  word_t a, b, lo, hi, lo_o, hi_o;
  int checks = 0, failures = 0;

  mac16 dut (.a_i(a), .b_i(b), .acc_lo_i(lo), .acc_hi_i(hi), .acc_lo_o(lo_o), .acc_hi_o(hi_o));

  function automatic logic [31:0] ref_lane(word_t x, word_t y, word_t l, word_t h, int k);
    int p, acc;
    p = int'(shortint'(x[16*k +: 16])) * int'(shortint'(y[16*k +: 16]));
    acc = (k < 2) ? int'(l[32*k +: 32]) : int'(h[32*(k-2) +: 32]);
    return 32'(acc + p);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      lo = {$urandom, $urandom}; hi = {$urandom, $urandom};
      if (n % 10 == 0) begin a = {4{16'h8000}}; b = {4{16'h8000}}; end
      #1;
      checks++;
      if ({hi_o, lo_o} !== {ref_lane(a,b,lo,hi,3), ref_lane(a,b,lo,hi,2),
                            ref_lane(a,b,lo,hi,1), ref_lane(a,b,lo,hi,0)}) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h lo=%h hi=%h -> %h %h", a, b, lo, hi, lo_o, hi_o);
      end
    end
    // 128-tap window * samples, accumulated in 4 lanes over 32 MAC_16
    begin
      longint sum [4];
      shortint w, x;
      sum = '{0, 0, 0, 0};
      lo = 0; hi = 0;
      for (int t = 0; t < 32; t++) begin
        for (int k = 0; k < 4; k++) begin
          w = shortint'($urandom); x = shortint'($urandom);
          a[16*k +: 16] = w; b[16*k +: 16] = x;
          sum[k] += longint'(w) * longint'(x);
        end
        #1;
        lo = lo_o; hi = hi_o;
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if ((k < 2 ? lo[32*k +: 32] : hi[32*(k-2) +: 32]) !== 32'(sum[k])) failures++;
      end
    end
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
