// Shared widths and types of the approximate Sobel edge detector.
//
// Pixels are 8-bit grey levels. A difference of two pixels needs 9 bits in
// two's complement, the weighted column/row sum of one Sobel direction needs
// 11 bits signed (range -1020..1020), its magnitude 10 bits, and the sum of
// the two magnitudes |Gx|+|Gy| 11 bits unsigned (range 0..2040), which is
// what the 11-bit threshold comparator compares. The external SRAM has a
// 19-bit address and an 8-bit data bus.
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;          // grey-level pixel
  localparam int unsigned GSUM_W = PIX_W + 3;  // signed weighted sum of one direction
  localparam int unsigned GRAD_W = PIX_W + 2;  // |G| of one direction
  localparam int unsigned MAG_W  = PIX_W + 3;  // |Gx| + |Gy|
  localparam int unsigned ADDR_W = 19;         // SRAM address

  typedef logic [PIX_W-1:0] pixel_t;

  // 3x3 neighbourhood, indexed [row][col]; row 0 is the upper row (y-1),
  // col 0 the left column (x-1), [1][1] the centre pixel f(x,y).
  typedef pixel_t [2:0][2:0] window_t;

  // States of the SRAM control FSM. S_IDLE is the idle state.
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_RD0  = 3'd1,
    S_RD1  = 3'd2,
    S_WR0  = 3'd3,
    S_WR1  = 3'd4
  } sram_state_t;

endpackage
