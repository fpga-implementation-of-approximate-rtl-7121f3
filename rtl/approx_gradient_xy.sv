// Approximate gradient computation in x and y direction.
//
// Takes one 3x3 window per cycle and returns the approximate gradient
// magnitude |Gx| + |Gy|. Two approx_gradient units work in parallel: the x
// unit subtracts the left kernel column from the right one (rows y-1, y, y+1,
// weight 2 on row y), the y unit subtracts the upper kernel row from the
// lower one (columns x-1, x, x+1, weight 2 on column x). A further
// approximate adder adds the two magnitudes, the square-root-free
// approximation of sqrt(Gx^2 + Gy^2).
//
// Timing: three pipeline stages; win with in_valid at cycle t gives mag with
// out_valid at t+3, one window per cycle. The sign flags of both directions
// come out with the magnitude.
module approx_gradient_xy
  import sobel_pkg::*;
#(
  parameter int unsigned SUB_APPROX = 2,
  parameter int unsigned MUL_APPROX = 4,
  parameter int unsigned ADD_APPROX = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  window_t          win,
  output logic             out_valid,
  output logic [MAG_W-1:0] mag,
  output logic             flag_x,
  output logic             flag_y
);

  pixel_t [2:0] x_pa, x_pb, y_pa, y_pb;
  for (genvar k = 0; k < 3; k++) begin : g_taps
    assign x_pa[k] = win[k][2];   // f(x+1, y-1+k)
    assign x_pb[k] = win[k][0];   // f(x-1, y-1+k)
    assign y_pa[k] = win[2][k];   // f(x-1+k, y+1)
    assign y_pb[k] = win[0][k];   // f(x-1+k, y-1)
  end

  logic              vx, vy;
  logic [GRAD_W-1:0] mx, my;
  logic              fx, fy;

  approx_gradient #(.SUB_APPROX(SUB_APPROX), .MUL_APPROX(MUL_APPROX), .ADD_APPROX(ADD_APPROX)) u_gx (
    .clk, .rst_n, .in_valid, .pa(x_pa), .pb(x_pb), .out_valid(vx), .mag(mx), .flag(fx)
  );
  approx_gradient #(.SUB_APPROX(SUB_APPROX), .MUL_APPROX(MUL_APPROX), .ADD_APPROX(ADD_APPROX)) u_gy (
    .clk, .rst_n, .in_valid, .pa(y_pa), .pb(y_pb), .out_valid(vy), .mag(my), .flag(fy)
  );

  logic [MAG_W-1:0] msum;
  logic             unused_cout;
  approx_adder #(.W(MAG_W), .APPROX_BITS(ADD_APPROX)) u_mag (
    .a(MAG_W'(mx)), .b(MAG_W'(my)), .sum(msum), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
      flag_x    <= 1'b0;
      flag_y    <= 1'b0;
    end else begin
      out_valid <= vx;
      if (vx) begin
        mag    <= msum;
        flag_x <= fx;
        flag_y <= fy;
      end
    end
  end

  // both direction units share in_valid, so their valid outputs agree
  a_valid_agree: assert property (@(posedge clk) disable iff (!rst_n) vx == vy);

endmodule
