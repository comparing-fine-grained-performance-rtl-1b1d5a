// sobel_window: forms the sliding 3x3 neighbourhood of a row-major pixel
// stream, as in the classic delay-line convolver structure.
//
// Pixels enter one per enabled cycle. An input register and two chained
// line_buffer delay lines give, after each enable, the newest column of the
// neighbourhood: the new pixel, the pixel one row above it and the pixel two
// rows above. Six flip-flops hold the two older columns and shift left on each
// enable. The second delay line is one sample shorter than a row because it is
// fed from the first delay line's registered output, which already lags by one
// enable. The module also tracks the row and column of the newest pixel so the
// caller can tell when the window lies wholly inside the image.
//
// Interface: en/pix in; win[r][c] out (r=0 top row, c=2 newest column),
// row/col of the newest pixel. Timing: all outputs update on the enabled edge
// that takes the pixel. The structure (two delay lines, flip-flop window)
// follows the reference FPGA design; the counters are this design's own.
module sobel_window
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  pix_t                         pix,
  output win_t                         win,
  output logic [$clog2(IMG_H+1)-1:0]   row,
  output logic [$clog2(IMG_W+1)-1:0]   col
);
  localparam int unsigned RW = $clog2(IMG_H + 1);
  localparam int unsigned CW = $clog2(IMG_W + 1);

  pix_t pix_q, lb1_q, lb2_q;
  logic [RW-1:0] nxt_row;
  logic [CW-1:0] nxt_col;

  line_buffer #(.DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb1 (
    .clk, .rst_n, .en, .din(pix), .dout(lb1_q)
  );
  line_buffer #(.DEPTH(IMG_W - 1), .WIDTH(PIX_W)) u_lb2 (
    .clk, .rst_n, .en, .din(lb1_q), .dout(lb2_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_q <= '0;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= '0;
        win[r][1] <= '0;
      end
    end else if (en) begin
      pix_q <= pix;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
    end
  end

  // Newest column straight from the input register and the delay lines.
  assign win[0][2] = lb2_q;
  assign win[1][2] = lb1_q;
  assign win[2][2] = pix_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nxt_row <= '0;
      nxt_col <= '0;
      row     <= '0;
      col     <= '0;
    end else if (en) begin
      row <= nxt_row;
      col <= nxt_col;
      if (nxt_col == CW'(IMG_W - 1)) begin
        nxt_col <= '0;
        nxt_row <= (nxt_row == RW'(IMG_H - 1)) ? '0 : nxt_row + 1'b1;
      end else begin
        nxt_col <= nxt_col + 1'b1;
      end
    end
  end
endmodule
