// sobel_fpga: one-pixel-per-clock Sobel edge detector, |Gx|+|Gy|, for a
// row-major stream of IMG_W x IMG_H 8-bit pixels.
//
// A pixel is taken on every clock on which in_valid is high. sobel_window
// builds the 3x3 neighbourhood from two row delay lines and a flip-flop
// window; sobel_convolve computes the magnitude combinationally and registers
// it. Every accepted pixel produces exactly one output two clocks later. The
// output for the pixel at (r, c) is the magnitude centred on (r-1, c-1); it is
// 0 (and out_border is high) when r < 2 or c < 2, where the neighbourhood is
// not yet wholly inside the image. The output image is thus the Sobel image
// shifted down and right by one pixel with a zero frame on its top and left.
//
// Interface: in_valid/in_pix in; out_valid/out_mag/out_border out. There is
// no back-pressure: the detector always keeps up with the input. The
// structure and rate follow the reference FPGA design; the border policy,
// the 11-bit output and the 2-cycle latency are this design's choice.
module sobel_fpga
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output logic out_valid,
  output mag_t out_mag,
  output logic out_border
);
  win_t                        win;
  logic [$clog2(IMG_H+1)-1:0]  row;
  logic [$clog2(IMG_W+1)-1:0]  col;
  logic                        win_valid;
  logic                        border;

  sobel_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_window (
    .clk, .rst_n, .en(in_valid), .pix(in_pix), .win, .row, .col
  );

  assign border = (row < 2) || (col < 2);

  sobel_convolve u_convolve (
    .clk, .rst_n, .en(win_valid), .win, .zero(border), .mag(out_mag)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid  <= 1'b0;
      out_valid  <= 1'b0;
      out_border <= 1'b0;
    end else begin
      win_valid <= in_valid;
      out_valid <= win_valid;
      if (win_valid) out_border <= border;
    end
  end
endmodule
