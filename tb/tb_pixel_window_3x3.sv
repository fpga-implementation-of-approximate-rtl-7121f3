// Test of pixel_window_3x3 on a 9 x 6 image: two frames of random pixels fed
// with random gaps. Every window must be the 3x3 neighbourhood of an interior
// pixel, in raster order, with the right centre coordinates, one cycle after
// the pixel that completes it; each frame must give exactly 7 x 4 windows.
module tb_pixel_window_3x3;
  import sobel_pkg::*;

  localparam int W = 9, H = 6, FRAMES = 2;

  logic        clk = 0, rst_n = 0, pix_valid = 0;
  pixel_t      pix_in = '0;
  logic        win_valid;
  window_t     win;
  logic [3:0]  win_x;
  logic [2:0]  win_y;
  int checks = 0, failures = 0, nwin = 0, gaps = 0;
  int img [FRAMES][H][W];
  logic pv_q = 0;   // pix_valid at the last clock edge

  pixel_window_3x3 #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .pix_valid, .pix_in, .win_valid, .win, .win_x, .win_y);

  always #5 clk = ~clk;
  always @(posedge clk) pv_q <= pix_valid;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 2) == 0) begin
            pix_valid = 0;
            gaps++;
            @(negedge clk);
          end
          pix_valid = 1;
          pix_in    = 8'(img[f][y][x]);
        end
    @(negedge clk);
    pix_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nwin != FRAMES * (W - 2) * (H - 2)) begin
      failures++;
      $display("got %0d windows, expected %0d", nwin, FRAMES * (W - 2) * (H - 2));
    end
    checks++;
    if (gaps == 0) failures++;
    $display("windows=%0d input gaps=%0d", nwin, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && win_valid) begin
      int f, k, cx, cy;
      f  = nwin / ((W - 2) * (H - 2));
      k  = nwin % ((W - 2) * (H - 2));
      cx = 1 + k % (W - 2);
      cy = 1 + k / (W - 2);
      checks += 3;
      if (int'(win_x) != cx || int'(win_y) != cy) begin
        failures++;
        if (failures < 10) $display("window %0d at (%0d,%0d), expected (%0d,%0d)", nwin, win_x, win_y, cx, cy);
      end
      if (!pv_q) failures++;   // window one cycle after its last pixel
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          if (f < FRAMES && int'(win[r][c]) != img[f][cy - 1 + r][cx - 1 + c]) begin
            failures++;
            if (failures < 10) $display("window %0d pixel [%0d][%0d] wrong", nwin, r, c);
          end
      nwin++;
    end
  end
endmodule
