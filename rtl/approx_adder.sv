// Approximate adder (the design's AA12 adder position).
//
// A lower-part-OR adder: the low APPROX_BITS bits of the sum are the bitwise
// OR of the operands and produce no carry chain; the carry into the exact
// upper part is the AND of the two operand bits at position APPROX_BITS-1.
// The upper W-APPROX_BITS bits are added exactly. With APPROX_BITS = 0 the
// block is an exact adder. The error of the sum is bounded by 2**APPROX_BITS
// in magnitude and is zero whenever the low bits of a and b share no set bit
// (in particular when one operand is zero).
//
// The original design names the adder it uses but does not describe its inside; the
// lower-part-OR scheme and the default of 2 approximate bits are this
// design's choice. Purely combinational.
//
// Ports: a, b (W bits, any encoding: the sum is taken modulo 2**W, so two's
// complement operands work), sum (W bits), cout (carry out of bit W-1).
module approx_adder #(
  parameter int unsigned W           = 11,
  parameter int unsigned APPROX_BITS = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  if (APPROX_BITS == 0) begin : g_exact
    assign {cout, sum} = {1'b0, a} + {1'b0, b};
  end else begin : g_approx
    localparam int unsigned K = APPROX_BITS;
    logic         cin_hi;
    logic [W-K:0] hi;

    assign sum[K-1:0] = a[K-1:0] | b[K-1:0];
    assign cin_hi     = a[K-1] & b[K-1];
    assign hi         = {1'b0, a[W-1:K]} + {1'b0, b[W-1:K]} + (W-K+1)'(cin_hi);
    assign sum[W-1:K] = hi[W-K-1:0];
    assign cout       = hi[W-K];
  end

  initial assert (APPROX_BITS < W) else $error("approx_adder: APPROX_BITS must be below W");

endmodule
