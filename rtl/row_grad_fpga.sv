// row_grad_fpga: the FPGA form of the row-gradient fragment, the top-row
// part of the Sobel y-gradient, p[n] + 2*p[n-1] + p[n-2].
//
// Three pixel-wide registers form a shift chain clocked by one global clock,
// one step per valid input. The first two registers fan out both to the next
// register and to the adders; the x2 weight is a one-bit shift in the wiring;
// the two additions are combinational and feed one output pipeline register.
// The registers start at zero, so the first two sums see zeros for missing
// earlier pixels.
//
// Interface: in_valid/in_pix in; out_valid/out_sum out (10 bits, enough for
// 4*255). Timing: one pixel per clock, the sum for the pixel taken at clock n
// appears after clock n+1. The structure follows the reference FPGA fragment;
// the valid signal and the zero start are this design's choice.
module row_grad_fpga
  import sobel_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pix_t             in_pix,
  output logic             out_valid,
  output logic [PIX_W+1:0] out_sum
);
  pix_t r1, r2, r3;
  logic v1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
      v1 <= 1'b0;
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        r1 <= in_pix;
        r2 <= r1;
        r3 <= r2;
      end
      if (v1) out_sum <= (PIX_W+2)'(r1) + (PIX_W+2)'({r2, 1'b0}) + (PIX_W+2)'(r3);
    end
  end
endmodule
