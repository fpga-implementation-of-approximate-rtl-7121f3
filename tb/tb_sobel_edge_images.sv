// Image-set evaluation of sobel_edge_top at its default size (256 x 256):
// four synthetic grey-scale images (shapes on a ramp, a checkerboard,
// concentric rings, a smooth texture with noise) are each loaded into the
// SRAM and read back through the pipeline. Every result pixel is checked
// against the reference model of the approximate arithmetic. For each image
// the testbench then compares the approximate edge map with the edge map of
// exact Sobel arithmetic at the same threshold: it reports both edge counts
// and the structural similarity (SSIM) of the two binary maps, computed over
// the whole map at once (one global window, constants C1 = (0.01)^2 and
// C2 = (0.03)^2 for a dynamic range of 1).
module tb_sobel_edge_images;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 256, H = 256, N_IMG = 4;
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
  logic [7:0]        result_x, result_y;

  sobel_edge_top dut (
    .clk, .rst_n, .addr_n, .re, .we, .rd, .wr, .din, .dataout, .data_en,
    .sram_addr, .sram_d, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .threshold, .result, .result_valid, .result_x, .result_y
  );
  async_sram_model #(.AW(ADDR_W)) mem (.addr(sram_addr), .d(sram_d), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [H][W];
  bit hw_map [H][W];
  bit ref_map [H][W];
  bit exact_map [H][W];
  int nres = 0;
  bit collecting = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp8(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  function automatic int pixel_of(int n, int x, int y);
    int v, dx, dy;
    case (n)
      0: begin
        v = 40 + x / 4;
        if (x >= 60 && x < 140 && y >= 40 && y < 110) v = 220;
        if ((x - 170) * (x - 170) + (y - 170) * (y - 170) < 2500) v = 15;
      end
      1: v = (((x / 32) + (y / 32)) % 2) ? 200 : 60;
      2: begin
        dx = x - 128; dy = y - 128;
        v = (((dx * dx + dy * dy) / 400) % 2) ? 180 : 70;
      end
      default: v = 128 + (x % 64) - (y % 48);
    endcase
    return clamp8(v + int'($urandom_range(0, 12)) - 6);
  endfunction

  always @(negedge clk) begin
    if (rst_n && collecting && result_valid) begin
      int ex, ey;
      ex = 1 + nres % (W - 2);
      ey = 1 + nres / (W - 2);
      checks += 2;
      if (int'(result_x) != ex || int'(result_y) != ey) failures++;
      hw_map[ey][ex] = result;
      if (result != ref_map[ey][ex]) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) differs from the reference", ex, ey);
      end
      nres++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < N_IMG; n++) begin
      int n_hw, n_ex, n_both;
      real mx, my, vx, vy, cxy, ssim, cnt;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = pixel_of(n, x, y);
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          int w[3][3];
          bit px, py;
          for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = img[y - 1 + r][x - 1 + c];
          ref_map[y][x]   = ref_mag(w, 2, 4, 2, px, py) > THR;
          exact_map[y][x] = exact_mag(w) > THR;
        end
      // load
      for (int i = 0; i < W * H; i++) begin
        we = 1; addr_n = ADDR_W'(i); din = 8'(img[i / W][i % W]);
        @(negedge clk);
        @(negedge clk);
      end
      we = 0;
      @(negedge clk);
      // process
      nres = 0;
      collecting = 1;
      re = 1; addr_n = '0;
      for (int i = 1; i <= W * H; i++) begin
        @(negedge clk);
        @(negedge clk);
        if (i < W * H) addr_n = ADDR_W'(i);
        else re = 0;
      end
      repeat (10) @(negedge clk);
      collecting = 0;
      checks++;
      if (nres != (W - 2) * (H - 2)) begin
        failures++;
        $display("image %0d: %0d results", n, nres);
      end
      // compare with exact Sobel
      n_hw = 0; n_ex = 0; n_both = 0;
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          n_hw   += hw_map[y][x];
          n_ex   += exact_map[y][x];
          n_both += hw_map[y][x] & exact_map[y][x];
        end
      cnt = (W - 2) * (H - 2);
      mx  = n_hw / cnt;
      my  = n_ex / cnt;
      vx  = n_hw / cnt - mx * mx;
      vy  = n_ex / cnt - my * my;
      cxy = n_both / cnt - mx * my;
      ssim = ((2 * mx * my + 0.0001) * (2 * cxy + 0.0009)) /
             ((mx * mx + my * my + 0.0001) * (vx + vy + 0.0009));
      $display("image %0d: edge pixels approximate=%0d exact=%0d common=%0d SSIM=%0.4f",
               n, n_hw, n_ex, n_both, ssim);
      checks++;
      if (n_hw == 0) begin failures++; $display("image %0d has no edges", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
