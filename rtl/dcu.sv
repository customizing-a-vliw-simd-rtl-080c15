// dcu: division co-processor unit.
//
// The program starts a division by storing two operands into the unit: the
// dividend (address 0) and then the divisor (address 1). The store of the
// divisor also carries an iteration count and starts the unit. It then runs
// one iteration per clock cycle, each producing BPI quotient bits from the
// most significant end (BPI restoring subtract-and-compare steps chained in
// one cycle), and stops after the given count or when all QW bits are known.
// The program reads the quotient with a later load (result_o). A smaller
// count gives a faster, less precise result; a count of zero runs to full
// precision. That is the document's scheme: operands in by stores, a
// user-defined delay that sets the iterations, one iteration per cycle and a
// delayed load, with the scheduler (not hardware interlocks) keeping the
// load far enough behind the start.
//
// Fixed-point format: the quotient is floor(dividend * 2^FRAC / divisor),
// unsigned, saturated to QW bits (also for a zero divisor). With FRAC = 15
// and QW = 16 a gain below one comes out as a Q1.15 number, the shape the
// noise-reduction gain of the document needs. The radix, the widths and the
// format are this design's choices; the document only says that the format
// is adjusted to the application.
//
// Timing: start in cycle t, bit group i (counting from the top) is in
// result_o after cycle t+i+1; busy_o is high while iterating.
module dcu #(
  parameter int unsigned DW   = 32,   // operand width
  parameter int unsigned QW   = 16,   // quotient width
  parameter int unsigned FRAC = 15,   // fraction bits added to the dividend
  parameter int unsigned BPI  = 4     // quotient bits per iteration
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic          addr_i,      // 0: dividend, 1: divisor and start
  input  logic [DW-1:0] wdata_i,
  input  logic [5:0]    iters_i,     // iterations, 0 = until done
  output logic [QW-1:0] result_o,
  output logic          busy_o
);

  localparam int unsigned RW = DW + QW + FRAC;   // wide enough for every compare
  localparam int unsigned CW = $clog2(QW + 1);

  logic [DW-1:0] dividend_q;
  logic [RW-1:0] div_q;        // divisor, widened
  logic [RW-1:0] rem_q;        // partial remainder
  logic [QW-1:0] quo_q;
  logic [CW-1:0] left_q;       // quotient bits still to find
  logic [5:0]    iters_q;      // iterations still allowed (0 = no limit)
  logic          limit_q;

  // one iteration: BPI restoring steps
  logic [RW-1:0] rem_n;
  logic [QW-1:0] quo_n;
  logic [CW-1:0] left_n;

  always_comb begin
    rem_n  = rem_q;
    quo_n  = quo_q;
    left_n = left_q;
    for (int j = 0; j < int'(BPI); j++) begin
      if (left_n != 0) begin
        if (rem_n >= (div_q << (left_n - 1))) begin
          rem_n = rem_n - (div_q << (left_n - 1));
          quo_n[left_n - 1] = 1'b1;
        end
        left_n = left_n - 1'b1;
      end
    end
  end

  logic [RW-1:0] num_start, den_start;
  always_comb begin
    num_start = RW'(dividend_q) << FRAC;
    den_start = RW'(wdata_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend_q <= '0;
      div_q      <= '0;
      rem_q      <= '0;
      quo_q      <= '0;
      left_q     <= '0;
      iters_q    <= '0;
      limit_q    <= 1'b0;
    end else if (we_i && !addr_i) begin
      dividend_q <= wdata_i;
    end else if (we_i && addr_i) begin
      div_q   <= den_start;
      rem_q   <= num_start;
      iters_q <= iters_i;
      limit_q <= (iters_i != 0);
      if (den_start == '0 || num_start >= (den_start << QW)) begin
        quo_q  <= '1;        // saturate
        left_q <= '0;
      end else begin
        quo_q  <= '0;
        left_q <= CW'(QW);
      end
    end else if (left_q != 0 && !(limit_q && iters_q == 0)) begin
      rem_q   <= rem_n;
      quo_q   <= quo_n;
      left_q  <= left_n;
      iters_q <= iters_q - 6'(limit_q);
    end
  end

  assign result_o = quo_q;
  assign busy_o   = (left_q != 0) && !(limit_q && iters_q == 0);

endmodule
