// End-to-end test of sobel_edge_top with the median pre-filter enabled, on a
// 64 x 48 image with salt-and-pepper noise on a rectangle. The image is
// written into a behavioural SRAM and read back as one stream; every result
// is checked, with its coordinates and latency (7 cycles after the en of the
// pixel that completes it), against a reference that median-filters the image
// and applies the approximate Sobel model and the threshold. Counts noise
// pixels the filter removed, edges and non-edges.
module tb_sobel_edge_median;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 64, H = 48;
  localparam int THR = 150;

  logic              clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] addr_n = '0;
  logic              re = 0, we = 0, rd = 1, wr = 1;
  pixel_t            din = '0, dataout;
  logic              data_en;
  logic [ADDR_W-1:0] sram_addr;
  wire  [7:0]        sram_d;
  logic              sram_ce_n, sram_oe_n, sram_we_n;
  logic [MAG_W-1:0]  threshold = MAG_W'(THR);
  logic              result, result_valid;
  logic [5:0]        result_x, result_y;

  sobel_edge_top #(.IMG_W(W), .IMG_H(H), .MEDIAN_EN(1'b1)) dut (
    .clk, .rst_n, .addr_n, .re, .we, .rd, .wr, .din, .dataout, .data_en,
    .sram_addr, .sram_d, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .threshold, .result, .result_valid, .result_x, .result_y
  );
  async_sram_model #(.AW(ADDR_W)) mem (.addr(sram_addr), .d(sram_d), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [H][W];
  int flt [H][W];
  int exp_res [H][W];
  int cycle = 0;
  int en_cycle [$];
  int nres = 0, n_edge = 0, n_nonedge = 0, n_noise = 0, n_removed = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = (x >= 20 && x < 44 && y >= 12 && y < 36) ? 200 : 50;
        if ($urandom_range(0, 19) == 0) begin
          img[y][x] = $urandom_range(0, 1) ? 255 : 0;
          n_noise++;
        end
      end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int v[9];
        for (int i = 0; i < 9; i++) v[i] = img[y - 1 + i / 3][x - 1 + i % 3];
        v.sort();
        flt[y][x] = v[4];
        if ((img[y][x] == 0 || img[y][x] == 255) && flt[y][x] != img[y][x]) n_removed++;
      end
    for (int y = 2; y < H - 2; y++)
      for (int x = 2; x < W - 2; x++) begin
        int w[3][3];
        bit px, py;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = flt[y - 1 + r][x - 1 + c];
        exp_res[y][x] = ref_mag(w, 2, 4, 2, px, py) > THR;
      end
  end

  always @(negedge clk) begin
    cycle++;
    if (data_en) en_cycle.push_back(cycle);
    if (rst_n && result_valid) begin
      int ex, ey, done_pix;
      ex = 2 + nres % (W - 4);
      ey = 2 + nres / (W - 4);
      checks += 3;
      if (int'(result_x) != ex || int'(result_y) != ey) begin
        failures++;
        if (failures < 10) $display("result %0d at (%0d,%0d), expected (%0d,%0d)", nres, result_x, result_y, ex, ey);
      end
      if (result != exp_res[ey][ex][0]) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) wrong", ex, ey);
      end
      // the input pixel completing this result is (ex+2, ey+2)
      done_pix = (ey + 2) * W + ex + 2;
      if (done_pix >= en_cycle.size() || cycle - en_cycle[done_pix] != 7) begin
        failures++;
        if (failures < 10) $display("result (%0d,%0d) latency wrong", ex, ey);
      end
      if (result) n_edge++; else n_nonedge++;
      nres++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < W * H; i++) begin
      we = 1; addr_n = ADDR_W'(i); din = 8'(img[i / W][i % W]);
      @(negedge clk);
      @(negedge clk);
    end
    we = 0; re = 1; addr_n = '0;
    for (int i = 1; i <= W * H; i++) begin
      @(negedge clk);
      @(negedge clk);
      if (i < W * H) addr_n = ADDR_W'(i);
      else re = 0;
    end
    repeat (12) @(negedge clk);
    checks++;
    if (nres != (W - 4) * (H - 4)) begin
      failures++;
      $display("%0d results, expected %0d", nres, (W - 4) * (H - 4));
    end
    checks += 3;
    if (n_removed == 0) begin failures++; $display("median filter removed no noise"); end
    if (n_edge == 0)    begin failures++; $display("no edge pixel"); end
    if (n_nonedge == 0) begin failures++; $display("no non-edge pixel"); end
    $display("noise pixels=%0d removed by the filter=%0d results=%0d edges=%0d non-edges=%0d",
             n_noise, n_removed, nres, n_edge, n_nonedge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
