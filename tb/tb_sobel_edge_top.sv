// End-to-end test of sobel_edge_top at its default size (256 x 256 pixels).
// A synthetic grey-scale image (horizontal ramp, a bright rectangle, a dark
// disc, a diagonal line and noise) is written into a behavioural SRAM through
// the controller, then read back as one stream with re held high; the last
// write hands over directly to the first read, and the image is read twice in
// a row, so the second frame follows the first. Every edge pixel on result is
// checked, with its coordinates and its cycle, against the reference model of
// the approximate arithmetic and the threshold. The agreement with exact
// Sobel edges is reported.
//
// Mechanisms counted (each must occur): SRAM writes, reads, back-to-back
// reads, the WR1 -> RD0 switch, positive and negative x and y gradients,
// edge and non-edge pixels, border pixels without a result, frame wrap-around, and pixels where
// the approximate magnitude differs from the exact one.
module tb_sobel_edge_top;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 256, H = 256;
  localparam int THR = 150;
  localparam int FRAMES = 2;

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
  int exp_res [H][W];
  int exp_mag [H][W];
  int exact_res [H][W];
  int cycle = 0;
  int en_cycle [$];
  int nres = 0, n_edge = 0, n_nonedge = 0, n_back2back = 0, n_wr_to_rd = 0;
  int n_xpos = 0, n_xneg = 0, n_ypos = 0, n_yneg = 0, n_mag_diff = 0, n_vs_exact = 0;
  bit done = 0;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp8(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v = 40 + x / 4;
        if (x >= 60 && x < 140 && y >= 40 && y < 110) v = 220;
        if ((x - 170) * (x - 170) + (y - 170) * (y - 170) < 50 * 50) v = 15;
        if (x - y >= -2 && x - y <= 2 && y > 120) v = 250;
        img[y][x] = clamp8(v + int'($urandom_range(0, 8)) - 4);
      end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int w[3][3];
        bit px, py;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = img[y - 1 + r][x - 1 + c];
        exp_mag[y][x]   = ref_mag(w, 2, 4, 2, px, py);
        exp_res[y][x]   = exp_mag[y][x] > THR;
        exact_res[y][x] = exact_mag(w) > THR;
        if (exp_mag[y][x] != exact_mag(w)) n_mag_diff++;
      end
  end

  always @(negedge clk) begin
    cycle++;
    if (data_en) en_cycle.push_back(cycle);
    if (rst_n && dut.u_sram.state == S_RD0 && $past(dut.u_sram.state) == S_RD1) n_back2back++;
    if (rst_n && dut.u_sram.state == S_RD0 && $past(dut.u_sram.state) == S_WR1) n_wr_to_rd++;
    if (rst_n && dut.u_grad.out_valid) begin
      if (dut.u_grad.flag_x) n_xpos++; else n_xneg++;
      if (dut.u_grad.flag_y) n_ypos++; else n_yneg++;
    end
    if (rst_n && result_valid) begin
      int ex, ey, k, done_pix, frame;
      frame = nres / ((W - 2) * (H - 2));
      k  = nres % ((W - 2) * (H - 2));
      ex = 1 + k % (W - 2);
      ey = 1 + k / (W - 2);
      checks += 3;
      if (int'(result_x) != ex || int'(result_y) != ey) begin
        failures++;
        if (failures < 10) $display("result %0d at (%0d,%0d), expected (%0d,%0d)", k, result_x, result_y, ex, ey);
      end
      if (result != exp_res[ey][ex][0]) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d): result %0b, magnitude %0d", ex, ey, result, exp_mag[ey][ex]);
      end
      // the pixel completing this window is (ex+1, ey+1): result 5 cycles after its en
      done_pix = frame * W * H + (ey + 1) * W + ex + 1;
      if (done_pix >= en_cycle.size() || cycle - en_cycle[done_pix] != 5) begin
        failures++;
        if (failures < 10) $display("result (%0d,%0d) latency wrong", ex, ey);
      end
      if (result) n_edge++; else n_nonedge++;
      if (result != exact_res[ey][ex][0]) n_vs_exact++;
      nres++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load the image, one write per two cycles
    for (int i = 0; i < W * H; i++) begin
      we = 1; addr_n = ADDR_W'(i); din = 8'(img[i / W][i % W]);
      @(negedge clk);   // WR0
      @(negedge clk);   // WR1
    end
    // straight from the last write into the read stream; the image is read
    // twice without a break, so the second frame follows the first directly
    we = 0; re = 1; addr_n = '0;
    for (int i = 1; i <= FRAMES * W * H; i++) begin
      @(negedge clk);   // RD0
      @(negedge clk);   // RD1
      if (i < FRAMES * W * H) addr_n = ADDR_W'(i % (W * H));
      else re = 0;
    end
    repeat (10) @(negedge clk);

    checks++;
    if (nres != FRAMES * (W - 2) * (H - 2)) begin
      failures++;
      $display("%0d results, expected %0d", nres, FRAMES * (W - 2) * (H - 2));
    end
    checks++;
    if (mem.writes != W * H) begin failures++; $display("%0d SRAM writes", mem.writes); end
    checks++;
    if (en_cycle.size() != FRAMES * W * H) begin failures++; $display("%0d SRAM reads", en_cycle.size()); end
    checks += 8;  // mechanisms
    if (n_back2back == 0) begin failures++; $display("no back-to-back reads"); end
    if (n_wr_to_rd == 0)  begin failures++; $display("no write-to-read switch"); end
    if (n_xpos == 0 || n_xneg == 0) begin failures++; $display("x gradient sign not both"); end
    if (n_ypos == 0 || n_yneg == 0) begin failures++; $display("y gradient sign not both"); end
    if (n_edge == 0)    begin failures++; $display("no edge pixel"); end
    if (n_nonedge == 0) begin failures++; $display("no non-edge pixel"); end
    if (FRAMES * W * H - nres == 0) begin failures++; $display("no border pixel"); end
    if (n_mag_diff == 0) begin failures++; $display("approximation never changed a magnitude"); end
    checks++;
    if (nres <= (W - 2) * (H - 2)) begin failures++; $display("no second frame"); end
    $display("SRAM writes=%0d reads=%0d back-to-back reads=%0d write-to-read switches=%0d",
             mem.writes, en_cycle.size(), n_back2back, n_wr_to_rd);
    $display("gradients: x+ %0d x- %0d y+ %0d y- %0d", n_xpos, n_xneg, n_ypos, n_yneg);
    $display("results=%0d edges=%0d non-edges=%0d border pixels=%0d", nres, n_edge, n_nonedge, FRAMES * W * H - nres);
    $display("approximate magnitude differs from exact at %0d pixels; edge map differs at %0d pixels (%0.2f%%)",
             n_mag_diff, n_vs_exact / FRAMES, 100.0 * n_vs_exact / nres);
    $display("cycles=%0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
