// sqrt_cop: radix-4 square-root co-processor.
//
// Computes the integer square root of a 64-bit radicand (the squared
// magnitude of a complex subband value) as a 32-bit root. Storing the
// radicand starts it, together with an iteration count; each iteration, one
// per clock cycle, fixes one radix-4 digit of the root, that is two root
// bits, by two chained restoring digit-by-digit steps, so 16 iterations give
// the full root. The root is built from the most significant end and is
// returned aligned, so a count below 16 or an early load returns the root with
// its low bits zero: run-time and precision are traded through the same
// delayed-load scheme as the division unit, and the run-time does not depend
// on the data. A count of zero runs to full precision.
//
// The document uses a radix-4 CORDIC here and does not give its inner
// structure; this unit keeps its interface, its radix, its fixed,
// data-independent latency and its precision/latency trade-off, but computes
// the digits with a restoring digit recurrence instead of CORDIC rotations.
// Range reduction and output format conversion stay in software, as in the
// document (the CLZ instruction helps there).
//
// Timing: start in cycle t, root bits [31-2i : 30-2i] are in result_o after
// cycle t+i+1; busy_o is high while iterating.
module sqrt_cop #(
  parameter int unsigned RW = 64   // radicand width (root is RW/2 bits)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we_i,
  input  logic [RW-1:0]     wdata_i,
  input  logic [5:0]        iters_i,
  output logic [RW/2-1:0]   result_o,
  output logic              busy_o
);

  localparam int unsigned NIT = RW / 4;          // radix-4 iterations
  localparam int unsigned CW  = $clog2(NIT + 1);

  logic [RW-1:0] rem_q, res_q, bit_q;
  logic [CW-1:0] left_q;
  logic [5:0]    iters_q;
  logic          limit_q;

  logic [RW-1:0] rem_n, res_n, bit_n;

  always_comb begin
    rem_n = rem_q;
    res_n = res_q;
    bit_n = bit_q;
    for (int j = 0; j < 2; j++) begin
      if (rem_n >= res_n + bit_n) begin
        rem_n = rem_n - (res_n + bit_n);
        res_n = (res_n >> 1) + bit_n;
      end else begin
        res_n = res_n >> 1;
      end
      bit_n = bit_n >> 2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q   <= '0;
      res_q   <= '0;
      bit_q   <= '0;
      left_q  <= '0;
      iters_q <= '0;
      limit_q <= 1'b0;
    end else if (we_i) begin
      rem_q   <= wdata_i;
      res_q   <= '0;
      bit_q   <= RW'(1) << (RW - 2);
      left_q  <= CW'(NIT);
      iters_q <= iters_i;
      limit_q <= (iters_i != 0);
    end else if (busy_o) begin
      rem_q   <= rem_n;
      res_q   <= res_n;
      bit_q   <= bit_n;
      left_q  <= left_q - 1'b1;
      iters_q <= iters_q - 6'(limit_q);
    end
  end

  // res_q holds P * 2^(2*left_q), P being the root found so far with its
  // low bits zero, so shifting it back gives the aligned partial root
  assign result_o = (RW/2)'(res_q >> (2 * left_q));
  assign busy_o   = (left_q != 0) && !(limit_q && iters_q == 0);

endmodule
