// Approximate multiplier (the design's approximate Dadda multiplier position).
//
// Unsigned A_W x B_W multiplier truncated to P_W product bits. The partial
// products a[j] & b[i] form the usual matrix, bit (i,j) in column i+j. The
// low APPROX_COLS columns are compressed without carries: each such product
// bit is the OR of its column, which is what an approximate 4-2 compressor
// tree that drops the carries of the least significant columns delivers. The
// columns from APPROX_COLS upward are summed exactly; how that exact sum is
// reduced (a Dadda tree on an ASIC, carry chains on an FPGA) is left to
// synthesis. With APPROX_COLS = 0 the product is exact.
//
// The original design names a Dadda multiplier built from approximate 4-2
// compressors but gives neither its compressor nor its tree; the carry-free
// low columns and the default of 4 of them are this design's choice. In the
// Sobel datapath one operand is the constant weight 2, which has a single
// partial-product row: every column then holds at most one bit and the
// approximation is exact there. Combinational.
//
// Because the product is taken modulo 2**P_W, a two's complement a that has
// been sign-extended to P_W bits times an unsigned b gives the correct two's
// complement product.
module approx_multiplier #(
  parameter int unsigned A_W         = 8,
  parameter int unsigned B_W         = 8,
  parameter int unsigned P_W         = 16,
  parameter int unsigned APPROX_COLS = 4
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [P_W-1:0] p
);

  localparam int unsigned FULL_W = A_W + B_W;
  localparam logic [FULL_W-1:0] LOW_MASK = FULL_W'((64'(1) << APPROX_COLS) - 64'(1));

  logic [FULL_W-1:0] exact_part;
  logic [FULL_W-1:0] low_part;

  always_comb begin
    exact_part = '0;
    low_part   = '0;
    for (int i = 0; i < B_W; i++) begin
      logic [FULL_W-1:0] row;
      row        = b[i] ? (FULL_W'(a) << i) : '0;
      exact_part = exact_part + (row & ~LOW_MASK);
      low_part   = low_part | (row & LOW_MASK);
    end
  end

  // exact_part has zeros in the low columns, so OR merges the two parts.
  assign p = P_W'(exact_part | low_part);

  initial assert (APPROX_COLS <= FULL_W) else $error("approx_multiplier: APPROX_COLS too large");

endmodule
