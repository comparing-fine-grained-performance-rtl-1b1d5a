// sobel_convolve: the convolve block of the streaming Sobel detector.
//
// From a 3x3 neighbourhood it computes Gx (right column minus left column,
// weights 1,2,1) and Gy (top row minus bottom row, weights 1,2,1), takes their
// absolute values and adds them, all in one combinational stage; the x2
// weights are wiring shifts, so there are no multipliers. The sum goes into a
// pipeline register on each enabled clock. 'zero' forces the registered result
// to 0, which the caller uses for windows that straddle the image border.
//
// Interface: en, win, zero in; mag out (11 bits). Timing: one cycle of
// latency, one result per clock. The combinational |Gx|+|Gy| and the absence
// of multipliers follow the reference FPGA design; the output register and
// the border zeroing are this design's choice.
module sobel_convolve
  import sobel_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  win_t win,
  input  logic zero,
  output mag_t mag
);
  always_ff @(posedge clk) begin
    if (!rst_n)  mag <= '0;
    else if (en) mag <= zero ? '0 : sobel_mag(win);
  end
endmodule
