// tb_x2_regfile: self-check of the register file against a shadow array.
// Random writes on all four ports (with same-address collisions, where the
// higher port must win) and random pair reads on all six ports: every read
// must return the register and its last-bit partner. Also checks reset.
module tb_x2_regfile;
  import asip_pkg::word_t;
  logic clk = 0, rst_n = 0;
  logic  [5:0][5:0] raddr;
  word_t [5:0][1:0] rdata;
  logic  [3:0]      we;
  logic  [3:0][5:0] waddr;
  word_t [3:0]      wdata;
  word_t shadow [64];
  int checks = 0, failures = 0, cycles = 0;

  x2_regfile #(.NREG(64), .NRP(6), .NWP(4)) dut (.clk(clk), .rst_n(rst_n), .raddr_i(raddr), .rdata_o(rdata),
                                                 .we_i(we), .waddr_i(waddr), .wdata_i(wdata));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    for (int r = 0; r < 64; r++) shadow[r] = '0;
    #12 rst_n = 1;
    for (int r = 0; r < 64; r++) begin
      raddr[0] = 6'(r); #1; checks++;
      if (rdata[0][0] !== '0) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = 6'($urandom % ((n % 3 == 0) ? 4 : 64));
        wdata[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < 6; p++) raddr[p] = 6'($urandom);
      #1;
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (rdata[p][0] !== shadow[raddr[p]] || rdata[p][1] !== shadow[raddr[p] ^ 6'd1]) begin
          failures++;
          if (failures < 10) $display("FAIL read port %0d addr %0d", p, raddr[p]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (we[p]) shadow[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
