// Threshold comparator.
//
// Turns the gradient magnitude into a binary edge pixel: when the enable en
// is high, result becomes 1 if data exceeds the fixed threshold and 0
// otherwise, and result_valid is raised for that cycle. While en is low the
// result holds its last value and result_valid is low. The comparison is
// W = 11 bits wide, the width of |Gx|+|Gy|, as the original design's 11-bit
// comparator. The threshold is a static input set by the host; making it a
// port rather than a constant, and registering the output, are this design's
// choices. Latency one cycle.
module threshold_comparator #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] data,
  input  logic [W-1:0] threshold,
  output logic         result,
  output logic         result_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= en;
      if (en) result <= (data > threshold);
    end
  end

endmodule
