// tb_sqrt_cop: self-check of the square-root co-processor. Random 64-bit
// radicands of random magnitude; after 16 iterations (16 cycles) the root
// must be floor(sqrt(x)) (checked as r^2 <= x < (r+1)^2), with fewer
// iterations the root's top 2n bits with the rest zero; the latency must not
// depend on the data.
module tb_sqrt_cop;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [63:0] x;
  logic [5:0]  iters;
  logic [31:0] r;
  logic        busy;
  int checks = 0, failures = 0, cycles = 0;

  sqrt_cop #(.RW(64)) dut (.clk(clk), .rst_n(rst_n), .we_i(we), .wdata_i(x), .iters_i(iters),
                           .result_o(r), .busy_o(busy));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [31:0] ref_isqrt(logic [63:0] v);
    logic [31:0] root = 0;
    for (int i = 31; i >= 0; i--) begin
      logic [31:0] t = root | (32'd1 << i);
      if (64'(t) * 64'(t) <= v) root = t;
    end
    return root;
  endfunction

  initial begin
    we = 0; x = 0; iters = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int it, waited;
      logic [31:0] exp;
      @(negedge clk);
      x = {$urandom, $urandom} >> ($urandom % 64);
      if (n == 0) x = '1;
      it = (n % 4 == 0) ? 1 + $urandom % 15 : 16;
      iters = 6'(it);
      we = 1;
      @(negedge clk); we = 0;
      waited = 0;
      while (busy) begin @(negedge clk); waited++; end
      exp = ref_isqrt(x);
      if (it < 16) exp = exp & (32'hFFFF_FFFF << (32 - 2 * it));
      checks++;
      if (r !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h it=%0d r=%h exp=%h", x, it, r, exp);
      end
      checks++;
      if (waited != it) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d for %0d iterations", waited, it);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
