// tb_clz_unit: self-check of count-leading-zeros for every subword size,
// on random values with a random number of cleared top bits and on zero.
module tb_clz_unit;
  import asip_pkg::*;
  size_e sz;
  word_t a, r;
  int checks = 0, failures = 0;

  clz_unit dut (.size_i(sz), .a_i(a), .res_o(r));

  function automatic word_t ref_clz(size_e s, word_t x);
    int unsigned w = 8 << s;
    word_t res = '0;
    for (int k = 0; k < 64 / int'(w); k++) begin
      int n = 0;
      for (int i = int'(w) - 1; i >= 0; i--) begin
        if (x[k * w + i]) break;
        n++;
      end
      res = res | (64'(n) << (k * w));
    end
    return res;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      sz = size_e'($urandom % 4);
      a = {$urandom, $urandom} >> ($urandom % 64);
      if (n % 50 == 0) a = '0;
      #1;
      checks++;
      if (r !== ref_clz(sz, a)) begin
        failures++;
        if (failures < 10) $display("FAIL sz=%0d a=%h r=%h exp=%h", sz, a, r, ref_clz(sz, a));
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
