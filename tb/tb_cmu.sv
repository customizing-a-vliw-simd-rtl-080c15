// tb_cmu: random self-check of the complex multiply unit against
// C = A * B computed with 64-bit integers, for both twiddle halves, and a
// few exact cases (multiply by 1, by -j).
module tb_cmu;
  import asip_pkg::*;
  word_t a, b, c;
  logic hi;
  int checks = 0, failures = 0;

  cmu dut (.a_i(a), .b_i(b), .hi_i(hi), .c_o(c));

  function automatic word_t ref_cmul(word_t x, word_t y, bit h);
    longint are, aim, bre, bim, re, im;
    are = longint'(int'(x[63:32]));
    aim = longint'(int'(x[31:0]));
    bre = longint'(shortint'(h ? y[63:48] : y[31:16]));
    bim = longint'(shortint'(h ? y[47:32] : y[15:0]));
    re = (are * bre - aim * bim) >>> 15;
    im = (are * bim + aim * bre) >>> 15;
    return {32'(re), 32'(im)};
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; hi = 1'($urandom);
      #1;
      checks++;
      if (c !== ref_cmul(a, b, hi)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h hi=%0d c=%h exp=%h", a, b, hi, c, ref_cmul(a, b, hi));
      end
    end
    // (1000 + 2000j) * (0.5 + 0j), high half holds -j
    a = {32'sd1000, 32'sd2000};
    b = {16'sd0, -16'sd32768, 16'sd16384, 16'sd0};
    hi = 0; #1; checks++;
    if (c !== {32'sd500, 32'sd1000}) begin failures++; $display("FAIL half %h", c); end
    hi = 1; #1; checks++;   // times -j: (2000 - 1000j)
    if (c !== {32'sd2000, -32'sd1000}) begin failures++; $display("FAIL -j %h", c); end
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
