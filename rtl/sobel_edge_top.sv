// Approximate Sobel edge detector, top level.
//
// An 8-bit grey-scale image is kept in an external asynchronous SRAM. The host
// fills it through the SRAM controller (we, addr_n, din) and then reads it
// back in raster order (re, addr_n). Every byte the controller returns (en)
// is also a pixel of the edge-detection pipeline: the 3x3 pixel generation
// builds the neighbourhood of each interior pixel, the approximate gradient
// unit computes |Gx| + |Gy| with approximate subtractors, multipliers and
// adders, and the threshold comparator, enabled by the controller's data
// strobe carried along the pipeline, turns the magnitude into a 1-bit edge
// pixel on result.
//
// Pipeline: window 1 cycle, gradient 3, comparator 1. result_valid follows the
// en pulse of a window's lower-right pixel by 5 cycles; result_x, result_y
// give the coordinates of the pixel the result belongs to. Only the
// (IMG_W-2) x (IMG_H-2) interior pixels yield a result. With re held high the
// controller delivers one pixel every two cycles, so the pipeline runs at
// half the clock rate.
//
// With MEDIAN_EN set, a 3x3 median filter cleans the image first: a first
// window generator and the median filter turn the pixel stream into the
// filtered (IMG_W-2) x (IMG_H-2) image, which a second window generator
// passes to the gradient unit. Results then cover the (IMG_W-4) x (IMG_H-4)
// pixels two or more away from the border, still in input-image coordinates,
// and come 7 cycles after the en of the pixel that completes them.
//
// The blocks and their connection follow the original design's architecture, which
// has no filter stage, hence MEDIAN_EN defaults to off; the algorithm the
// original design gives starts with median filtering. The image size, the
// approximation depths and the threshold port are this design's choices.
// IMG_W x IMG_H must fit the 2**19-byte SRAM.
module sobel_edge_top
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W      = 256,
  parameter int unsigned IMG_H      = 256,
  parameter int unsigned SUB_APPROX = 2,
  parameter int unsigned MUL_APPROX = 4,
  parameter int unsigned ADD_APPROX = 2,
  parameter bit          MEDIAN_EN  = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host side of the SRAM controller
  input  logic [ADDR_W-1:0]        addr_n,
  input  logic                     re,
  input  logic                     we,
  input  logic                     rd,
  input  logic                     wr,
  input  pixel_t                   din,
  output pixel_t                   dataout,
  output logic                     data_en,
  // SRAM device pins
  output logic [ADDR_W-1:0]        sram_addr,
  inout  wire  [PIX_W-1:0]         sram_d,
  output logic                     sram_ce_n,
  output logic                     sram_oe_n,
  output logic                     sram_we_n,
  // edge detection
  input  logic [MAG_W-1:0]         threshold,
  output logic                     result,
  output logic                     result_valid,
  output logic [$clog2(IMG_W)-1:0] result_x,
  output logic [$clog2(IMG_H)-1:0] result_y
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam int unsigned GRAD_LAT = 3;

  sram_state_t unused_state;
  pixel_t      sram_dout;
  logic        sram_doe;

  assign sram_d = sram_doe ? sram_dout : 'z;

  sram_controller u_sram (
    .clk, .rst_n, .addr_n, .re, .we, .rd, .wr, .din,
    .d_i(sram_d), .d_o(sram_dout), .d_oe(sram_doe), .dataout, .en(data_en), .addrout(sram_addr),
    .sram_ce_n, .sram_oe_n, .sram_we_n, .state(unused_state)
  );

  logic          win_valid;
  window_t       win;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;

  if (MEDIAN_EN) begin : g_median
    // median pre-filter: window -> median -> second window over the filtered
    // (IMG_W-2) x (IMG_H-2) image; coordinates mapped back to the input image
    localparam int unsigned FW  = IMG_W - 2;
    localparam int unsigned FH  = IMG_H - 2;
    localparam int unsigned FXW = $clog2(FW);
    localparam int unsigned FYW = $clog2(FH);

    logic          raw_valid, med_valid;
    window_t       raw_win;
    logic [XW-1:0] unused_raw_x;
    logic [YW-1:0] unused_raw_y;
    pixel_t        med;
    logic [FXW-1:0] fx;
    logic [FYW-1:0] fy;

    pixel_window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_raw (
      .clk, .rst_n, .pix_valid(data_en), .pix_in(dataout),
      .win_valid(raw_valid), .win(raw_win), .win_x(unused_raw_x), .win_y(unused_raw_y)
    );
    median_filter_3x3 u_median (
      .clk, .rst_n, .in_valid(raw_valid), .win(raw_win), .out_valid(med_valid), .med
    );
    pixel_window_3x3 #(.IMG_W(FW), .IMG_H(FH)) u_win (
      .clk, .rst_n, .pix_valid(med_valid), .pix_in(med),
      .win_valid, .win, .win_x(fx), .win_y(fy)
    );
    assign win_x = XW'(fx) + XW'(1);
    assign win_y = YW'(fy) + YW'(1);
  end else begin : g_direct
    pixel_window_3x3 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
      .clk, .rst_n, .pix_valid(data_en), .pix_in(dataout),
      .win_valid, .win, .win_x, .win_y
    );
  end

  logic             mag_valid;
  logic [MAG_W-1:0] mag;
  logic             unused_fx, unused_fy;

  approx_gradient_xy #(.SUB_APPROX(SUB_APPROX), .MUL_APPROX(MUL_APPROX), .ADD_APPROX(ADD_APPROX)) u_grad (
    .clk, .rst_n, .in_valid(win_valid), .win,
    .out_valid(mag_valid), .mag, .flag_x(unused_fx), .flag_y(unused_fy)
  );

  threshold_comparator #(.W(MAG_W)) u_cmp (
    .clk, .rst_n, .en(mag_valid), .data(mag), .threshold,
    .result, .result_valid
  );

  // coordinates travel alongside the gradient pipeline and the comparator
  logic [XW-1:0] x_pipe [GRAD_LAT+1];
  logic [YW-1:0] y_pipe [GRAD_LAT+1];
  always_ff @(posedge clk) begin
    x_pipe[0] <= win_x;
    y_pipe[0] <= win_y;
    for (int i = 1; i <= GRAD_LAT; i++) begin
      x_pipe[i] <= x_pipe[i-1];
      y_pipe[i] <= y_pipe[i-1];
    end
  end
  assign result_x = x_pipe[GRAD_LAT];
  assign result_y = y_pipe[GRAD_LAT];

  initial assert (IMG_W * IMG_H <= 2**ADDR_W) else $error("sobel_edge_top: image does not fit the SRAM");

endmodule
