// 3x3 median filter (the noise-removal step ahead of the Sobel operator).
//
// Returns the median of the nine pixels of a window: the element that would
// sit in the middle, position (N+1)/2 = 5 of N = 9, if the window were sorted.
// It is found by ranking rather than sorting: each pixel is compared with the
// eight others (ties broken by position, so every rank is unique) and the
// pixel with exactly four smaller ones is selected. 36 comparators and a
// one-hot 9:1 multiplexer; the result is registered.
//
// Timing: win with in_valid at cycle t gives med with out_valid at t+1, one
// window per cycle. The ranking method and the register are this design's
// choices; the original design gives only the median itself.
module median_filter_3x3
  import sobel_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  window_t win,
  output logic    out_valid,
  output pixel_t  med
);

  pixel_t      p [9];
  logic [3:0]  rank [9];
  logic [8:0]  is_med;
  pixel_t      sel;

  for (genvar i = 0; i < 9; i++) begin : g_flat
    assign p[i] = win[i / 3][i % 3];
  end

  always_comb begin
    sel = '0;
    for (int i = 0; i < 9; i++) begin
      rank[i] = '0;
      for (int j = 0; j < 9; j++)
        if (j != i && (p[j] < p[i] || (p[j] == p[i] && j < i))) rank[i] = rank[i] + 4'd1;
      is_med[i] = (rank[i] == 4'd4);
      if (is_med[i]) sel = sel | p[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      med       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) med <= sel;
    end
  end

  // exactly one pixel has rank 4
  a_one_median: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> $onehot(is_med));

endmodule
