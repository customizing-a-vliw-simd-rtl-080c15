// tb_dmem: self-check of the two-bank data memory against a shadow array:
// single-word and pair reads and writes on port A, single-word accesses on
// port B, and simultaneous writes to one word (port A must win).
module tb_dmem;
  import asip_pkg::word_t;
  logic clk = 0;
  logic [13:0] a_addr, b_addr;
  logic a_pair, a_we, b_we;
  word_t [1:0] a_wdata, a_rdata;
  word_t b_wdata, b_rdata;
  word_t shadow [2048];
  int checks = 0, failures = 0, cycles = 0;

  dmem #(.DEPTH(2048), .AW(14)) dut (.clk(clk), .a_addr_i(a_addr), .a_pair_i(a_pair), .a_we_i(a_we),
      .a_wdata_i(a_wdata), .a_rdata_o(a_rdata), .b_addr_i(b_addr), .b_we_i(b_we),
      .b_wdata_i(b_wdata), .b_rdata_o(b_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    a_we = 0; b_we = 0; a_pair = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); b_we = 1; b_addr = 14'(i); b_wdata = {$urandom, $urandom}; shadow[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int n = 0; n < 4000; n++) begin
      int ea;
      @(negedge clk);
      a_addr = 14'($urandom % 2048); a_pair = 1'($urandom);
      b_addr = (n % 4 == 0) ? a_addr : 14'($urandom % 2048);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = {$urandom, $urandom, $urandom, $urandom}; b_wdata = {$urandom, $urandom};
      #1;
      ea = a_pair ? int'(a_addr) & ~1 : int'(a_addr);
      checks++;
      if (a_rdata[0] !== shadow[ea] || (a_pair && a_rdata[1] !== shadow[ea + 1]) ||
          b_rdata !== shadow[b_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read a=%0d pair=%0d b=%0d", a_addr, a_pair, b_addr);
      end
      @(posedge clk);
      if (b_we) shadow[b_addr] = b_wdata;
      if (a_we) begin
        shadow[ea] = a_wdata[0];
        if (a_pair) shadow[ea + 1] = a_wdata[1];
      end
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < 2048; i++) begin
      b_addr = 14'(i); #1; checks++;
      if (b_rdata !== shadow[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
