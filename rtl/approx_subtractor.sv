// Approximate subtractor (the design's APSC4 subtractor position).
//
// Computes a - b for two unsigned W-bit values. The low APPROX_BITS bits of
// the difference are a XOR b (each bit subtracted without a borrow chain);
// a borrow into the exact upper part is taken only from the top approximate
// bit, as (~a & b) at position APPROX_BITS-1. The upper bits are subtracted
// exactly. Equal operands always give exactly zero, so flat image regions
// produce no false gradient; the error is otherwise bounded by 2**APPROX_BITS.
// With APPROX_BITS = 0 the block is exact.
//
// The carry flag follows the original design: the carry (overflow) out of the
// subtraction marks a positive result (a >= b), its absence a negative one,
// and negative results are in two's complement. diff holds the low W bits and
// {~carry, diff} is the W+1-bit two's complement difference.
//
// The original design names the subtractor but not its inside; the XOR scheme and the
// default of 2 approximate bits are this design's choice. Combinational.
module approx_subtractor #(
  parameter int unsigned W           = 8,
  parameter int unsigned APPROX_BITS = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         carry   // 1: result is positive (a >= b), 0: negative
);

  if (APPROX_BITS == 0) begin : g_exact
    logic [W:0] d;
    assign d     = {1'b0, a} - {1'b0, b};
    assign diff  = d[W-1:0];
    assign carry = ~d[W];
  end else begin : g_approx
    localparam int unsigned K = APPROX_BITS;
    logic         bin_hi;
    logic [W-K:0] hi;

    assign diff[K-1:0] = a[K-1:0] ^ b[K-1:0];
    assign bin_hi      = ~a[K-1] & b[K-1];
    assign hi          = {1'b0, a[W-1:K]} - {1'b0, b[W-1:K]} - (W-K+1)'(bin_hi);
    assign diff[W-1:K] = hi[W-K-1:0];
    assign carry       = ~hi[W-K];
  end

  initial assert (APPROX_BITS < W) else $error("approx_subtractor: APPROX_BITS must be below W");

endmodule
