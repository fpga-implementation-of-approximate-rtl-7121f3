// 3x3 pixel generation.
//
// Receives a grey-scale image as a raster stream, one pixel per pix_valid
// (row by row, left to right, IMG_W x IMG_H pixels per frame, pixels may come
// at any rate) and presents, for every pixel that has a full neighbourhood,
// the 3x3 window around it: nine 8-bit pixels in parallel. Two line buffers
// of IMG_W pixels hold the two previous image rows; the incoming pixel and the
// two buffered pixels of the same column enter a 3x3 shift register as its
// new right-hand column.
//
// Windows are produced only for the (IMG_W-2) x (IMG_H-2) interior pixels;
// border pixels yield no output (the original design does not say how borders are
// treated). win_x, win_y give the coordinates of the window centre. The
// frame position counters wrap after IMG_W x IMG_H pixels, so frames follow
// each other without any other framing signal.
//
// Timing: win_valid rises in the cycle after the pix_valid of the window's
// lower-right pixel; one window per input pixel at most.
module pixel_window_3x3
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  pixel_t                   pix_in,
  output logic                     win_valid,
  output window_t                  win,
  output logic [$clog2(IMG_W)-1:0] win_x,
  output logic [$clog2(IMG_H)-1:0] win_y
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  pixel_t lb1 [IMG_W];   // previous row
  pixel_t lb2 [IMG_W];   // the row before it

  logic [XW-1:0] col;
  logic [YW-1:0] row;
  pixel_t        up2, up1;

  assign up2 = lb2[col];
  assign up1 = lb1[col];

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      lb2[col] <= up1;
      lb1[col] <= pix_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win       <= '0;
      win_valid <= 1'b0;
      win_x     <= '0;
      win_y     <= '0;
    end else begin
      win_valid <= 1'b0;
      if (pix_valid) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= pix_in;
        win_valid <= (row >= YW'(2)) && (col >= XW'(2));
        win_x     <= col - XW'(1);
        win_y     <= row - YW'(1);
        if (col == XW'(IMG_W - 1)) begin
          col <= '0;
          row <= (row == YW'(IMG_H - 1)) ? '0 : row + YW'(1);
        end else begin
          col <= col + XW'(1);
        end
      end
    end
  end

  initial assert (IMG_W >= 3 && IMG_H >= 3) else $error("pixel_window_3x3: image too small");

endmodule
