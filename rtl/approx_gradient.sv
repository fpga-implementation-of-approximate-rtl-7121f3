// One direction of the approximate Sobel gradient.
//
// Three approximate subtractors form the differences of the three pixel
// pairs across the kernel (minuend pa[k], subtrahend pb[k]); the middle
// difference is weighted by 2 in the approximate multiplier; two approximate
// adders sum the three terms into the signed value G. The sign flag (1 for a
// positive G) then selects either G itself or its two's complement in a 2:1
// multiplexer, so mag = |G|. For the x direction the pairs are the right and
// left kernel columns, for the y direction the lower and upper rows.
//
// Widths: the subtractors work on 8-bit pixels and return a 9-bit two's
// complement difference (8-bit result plus carry flag); multiplier and adders
// work on 11 bits, enough for -1020..1020 without overflow, and mag has 10
// bits, saturated at 1023 should approximation errors push |G| beyond it.
// The structure (subtractors, multiplier, adder, flag, two's complement,
// multiplexer) follows the original design; the internal widths are this design's
// choice, since 8 bits throughout cannot hold the gradient.
//
// Timing: two pipeline stages. in_valid with the pixels at cycle t gives
// out_valid with mag and flag at cycle t+2; a new input may arrive every
// cycle. Stage 1 registers G, stage 2 registers |G| and the flag.
module approx_gradient
  import sobel_pkg::*;
#(
  parameter int unsigned SUB_APPROX = 2,
  parameter int unsigned MUL_APPROX = 4,
  parameter int unsigned ADD_APPROX = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pixel_t [2:0]      pa,        // minuend pixels, [1] is the weighted pair
  input  pixel_t [2:0]      pb,        // subtrahend pixels
  output logic              out_valid,
  output logic [GRAD_W-1:0] mag,       // |G|
  output logic              flag       // 1: G >= 0, 0: G < 0
);

  logic [PIX_W-1:0]  diff  [3];
  logic [2:0]        carry;
  logic [GSUM_W-1:0] term  [3];        // sign-extended differences
  logic [GSUM_W-1:0] twice;            // 2 * middle difference
  logic [GSUM_W-1:0] sum01, g;
  logic              unused_c0, unused_c1;

  for (genvar k = 0; k < 3; k++) begin : g_sub
    approx_subtractor #(.W(PIX_W), .APPROX_BITS(SUB_APPROX)) u_sub (
      .a(pa[k]), .b(pb[k]), .diff(diff[k]), .carry(carry[k])
    );
    // {~carry, diff} is the 9-bit two's complement difference
    assign term[k] = {{(GSUM_W-PIX_W){~carry[k]}}, diff[k]};
  end

  approx_multiplier #(.A_W(GSUM_W), .B_W(2), .P_W(GSUM_W), .APPROX_COLS(MUL_APPROX)) u_mul (
    .a(term[1]), .b(2'd2), .p(twice)
  );

  approx_adder #(.W(GSUM_W), .APPROX_BITS(ADD_APPROX)) u_add0 (
    .a(term[0]), .b(twice), .sum(sum01), .cout(unused_c0)
  );
  approx_adder #(.W(GSUM_W), .APPROX_BITS(ADD_APPROX)) u_add1 (
    .a(sum01), .b(term[2]), .sum(g), .cout(unused_c1)
  );

  // stage 1
  logic [GSUM_W-1:0] g_q;
  logic              v1_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q  <= '0;
      v1_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) g_q <= g;
    end
  end

  // stage 2: sign flag, two's complement, 2:1 multiplexer
  logic              pos;
  logic [GSUM_W-1:0] g_neg, g_abs;
  assign pos   = ~g_q[GSUM_W-1];
  assign g_neg = ~g_q + GSUM_W'(1);
  assign g_abs = pos ? g_q : g_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag       <= '0;
      flag      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        mag  <= (|g_abs[GSUM_W-1:GRAD_W]) ? '1 : g_abs[GRAD_W-1:0];
        flag <= pos;
      end
    end
  end

endmodule
