// tb_circ_addr: self-check of the circular pointer rule. A pointer walks a
// buffer of 2^k words (k random) starting anywhere inside it, with step 1
// or 2; the reference keeps base + (offset + step) mod size. Wrap flags are
// checked against the reference wrap, and mask 0 must give linear counting.
module tb_circ_addr;
  logic [13:0] addr, mask, nxt;
  logic [1:0]  step;
  logic        wrap;
  int checks = 0, failures = 0;

  circ_addr #(.AW(14)) dut (.addr_i(addr), .mask_i(mask), .step_i(step), .addr_o(nxt), .wrap_o(wrap));

  initial begin
    for (int n = 0; n < 200; n++) begin
      int k, size, base, off;
      k = 1 + $urandom % 8;
      size = 1 << k;
      base = ($urandom % (16384 / size)) * size;
      step = 2'(1 + $urandom % 2);
      off = ($urandom % size) & ~(int'(step) - 1);
      mask = 14'(~(size - 1));
      for (int i = 0; i < 3 * size; i++) begin
        addr = 14'(base + off);
        #1;
        checks++;
        if (nxt !== 14'(base + (off + step) % size) || wrap !== (off + step >= size)) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%h mask=%h step=%0d nxt=%h wrap=%0d", addr, mask, step, nxt, wrap);
        end
        off = (off + step) % size;
      end
    end
    mask = 0; step = 1;
    for (int i = 0; i < 100; i++) begin
      addr = 14'($urandom % 16000); #1; checks++;
      if (nxt !== addr + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
