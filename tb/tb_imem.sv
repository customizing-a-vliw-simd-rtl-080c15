// tb_imem: self-check of the instruction memory: random bundles written
// through the load port, read back through the fetch port one cycle after
// the address, including a read of a word written in the same cycle
// (old value returned).
module tb_imem;
  logic clk = 0;
  logic [9:0] raddr, waddr;
  logic [63:0] rdata, wdata;
  logic we;
  logic [63:0] shadow [1024];
  int checks = 0, failures = 0, cycles = 0;

  imem #(.DEPTH(1024), .W(64)) dut (.clk(clk), .raddr_i(raddr), .rdata_o(rdata), .we_i(we),
                                    .waddr_i(waddr), .wdata_i(wdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [9:0] a;
      logic [63:0] old;
      a = 10'($urandom);
      raddr = a;
      old = shadow[a];
      if (n % 3 == 0) begin we = 1; waddr = a; wdata = {$urandom, $urandom}; end
      @(posedge clk);
      if (we) shadow[a] = wdata;
      @(negedge clk); we = 0;
      checks++;
      if (rdata !== old) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, old);
      end
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
