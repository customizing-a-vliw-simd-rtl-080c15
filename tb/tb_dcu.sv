// tb_dcu: self-check of the division co-processor. Random dividend and
// divisor (including gains above one that saturate and a zero divisor) are
// stored, then the quotient floor(a*2^15/b) is read after exactly
// QW/BPI = 4 cycles (the document's "#4" delay) and compared with an
// integer reference. Limited iteration counts must give the top bits of the
// quotient with the rest zero; busy must drop in the expected cycle.
module tb_dcu;
  logic clk = 0, rst_n = 0;
  logic we, addr;
  logic [31:0] wdata;
  logic [5:0]  iters;
  logic [15:0] q;
  logic        busy;
  int checks = 0, failures = 0, cycles = 0;

  dcu #(.DW(32), .QW(16), .FRAC(15), .BPI(4)) dut (.clk(clk), .rst_n(rst_n), .we_i(we), .addr_i(addr),
      .wdata_i(wdata), .iters_i(iters), .result_o(q), .busy_o(busy));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [15:0] ref_div(logic [31:0] a, logic [31:0] b);
    logic [63:0] qq;
    if (b == 0) return 16'hFFFF;
    qq = (64'(a) << 15) / 64'(b);
    return (qq > 64'hFFFF) ? 16'hFFFF : qq[15:0];
  endfunction

  task automatic run(logic [31:0] a, logic [31:0] b, int n);
    logic [15:0] exp, msk;
    int waited;
    @(negedge clk); we = 1; addr = 0; wdata = a;
    @(negedge clk); we = 1; addr = 1; wdata = b; iters = 6'(n);
    @(negedge clk); we = 0;
    waited = 0;
    while (busy) begin @(negedge clk); waited++; end
    exp = ref_div(a, b);
    if (n != 0 && n < 4 && exp != 16'hFFFF) begin
      msk = 16'hFFFF << (16 - 4 * n);
      exp = exp & msk;
    end
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d n=%0d q=%h exp=%h", a, b, n, q, exp);
    end
    // the unit finishes one iteration per cycle: 4 for full precision
    checks++;
    if (ref_div(a, b) != 16'hFFFF || b != 0) begin
      if (ref_div(a, b) != 16'hFFFF && waited != ((n == 0 || n > 4) ? 4 : n)) begin
        failures++;
        $display("FAIL latency %0d for n=%0d", waited, n);
      end
    end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0; iters = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] a, b;
      b = $urandom >> ($urandom % 32);
      a = (i % 4 == 0) ? $urandom >> ($urandom % 32) : 32'(({32'd0, b} * ($urandom % 65536)) >> 16);
      run(a, b, (i % 5 == 0) ? 1 + $urandom % 3 : 4);
    end
    run(100, 0, 4);
    run(7, 7, 0);
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
