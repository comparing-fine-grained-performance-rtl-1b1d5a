// sobel_pkg: types and arithmetic shared by the Sobel datapaths.
//
// Pixels are 8-bit unsigned. The Sobel magnitude |Gx|+|Gy| of a 3x3
// neighbourhood needs 11 bits: each gradient lies within +-1020, and the sum
// of their magnitudes is at most 6*255 = 1530. The kernel follows the Sobel
// operator: Gx weights the right column minus the left column by 1,2,1 and
// Gy the top row minus the bottom row by 1,2,1. The x2 weights are shifts,
// so no multiplier is needed. The 11-bit result width is this design's
// choice (full precision, no clipping to 8 bits).
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;            // pixel width
  localparam int unsigned MAG_W  = PIX_W + 3;    // |Gx|+|Gy| width
  localparam int unsigned GRAD_W = PIX_W + 3;    // signed gradient width (+-1020)
  localparam int unsigned WORD_W = 32;           // MPPA channel word width

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [MAG_W-1:0] mag_t;
  typedef logic [WORD_W-1:0] word_t;

  // 3x3 neighbourhood: w[row][col], row 0 is the oldest (top) row,
  // col 2 the newest (right) column.
  typedef pix_t [2:0][2:0] win_t;

  // Sobel magnitude |Gx| + |Gy| of one neighbourhood.
  function automatic mag_t sobel_mag(input win_t w);
    logic signed [GRAD_W-1:0] gx, gy;
    logic [GRAD_W-1:0] ax, ay;
    gx = $signed({3'b000, w[0][2]}) + $signed({2'b00, w[1][2], 1'b0}) + $signed({3'b000, w[2][2]})
       - $signed({3'b000, w[0][0]}) - $signed({2'b00, w[1][0], 1'b0}) - $signed({3'b000, w[2][0]});
    gy = $signed({3'b000, w[0][0]}) + $signed({2'b00, w[0][1], 1'b0}) + $signed({3'b000, w[0][2]})
       - $signed({3'b000, w[2][0]}) - $signed({2'b00, w[2][1], 1'b0}) - $signed({3'b000, w[2][2]});
    ax = gx[GRAD_W-1] ? GRAD_W'(-gx) : GRAD_W'(gx);
    ay = gy[GRAD_W-1] ? GRAD_W'(-gy) : GRAD_W'(gy);
    return MAG_W'(ax) + MAG_W'(ay);
  endfunction

endpackage
