// sobel_system: Sobel edge detection as a one-pixel-per-clock FPGA pipeline
// and as a channel-synchronised MPPA dataflow, side by side, together with
// the two forms of the row-gradient fragment used to compare them.
//
//  - fpga_*  : sobel_fpga, row delay lines + 3x3 flip-flop window +
//              combinational |Gx|+|Gy|; one pixel per clock, no back-pressure.
//  - mppa_*  : mppa_sobel, a row-aligning stage and a Sobel stage joined by
//              2-word blocking channels; by default 44 clocks per result.
//  - fragf_* : row_grad_fpga, p[n]+2p[n-1]+p[n-2] in registers, one per clock.
//  - fragm_* : row_grad_mppa, the same sum from five processors and eight
//              channels, one result per four clocks.
//
// The four parts share only the clock and reset; each has its own ports.
// Channel ports are valid/ready with 32-bit words; pixels are the low 8 bits.
module sobel_system
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W         = 512,
  parameter int unsigned IMG_H         = 512,
  parameter int unsigned KERNEL_CYCLES = 44
) (
  input  logic             clk,
  input  logic             rst_n,
  // FPGA Sobel pipeline
  input  logic             fpga_in_valid,
  input  pix_t             fpga_in_pix,
  output logic             fpga_out_valid,
  output mag_t             fpga_out_mag,
  output logic             fpga_out_border,
  // MPPA Sobel dataflow
  input  logic             mppa_in_valid,
  output logic             mppa_in_ready,
  input  word_t            mppa_in_data,
  output logic             mppa_out_valid,
  input  logic             mppa_out_ready,
  output word_t            mppa_out_data,
  // FPGA row-gradient fragment
  input  logic             fragf_in_valid,
  input  pix_t             fragf_in_pix,
  output logic             fragf_out_valid,
  output logic [PIX_W+1:0] fragf_out_sum,
  // MPPA row-gradient fragment
  input  logic             fragm_in_valid,
  output logic             fragm_in_ready,
  input  word_t            fragm_in_data,
  output logic             fragm_out_valid,
  input  logic             fragm_out_ready,
  output word_t            fragm_out_data,
  output logic [31:0]      fragm_op_count
);
  sobel_fpga #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fpga (
    .clk, .rst_n,
    .in_valid(fpga_in_valid), .in_pix(fpga_in_pix),
    .out_valid(fpga_out_valid), .out_mag(fpga_out_mag), .out_border(fpga_out_border)
  );

  mppa_sobel #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KERNEL_CYCLES(KERNEL_CYCLES)) u_mppa (
    .clk, .rst_n,
    .in_valid(mppa_in_valid), .in_ready(mppa_in_ready), .in_data(mppa_in_data),
    .out_valid(mppa_out_valid), .out_ready(mppa_out_ready), .out_data(mppa_out_data)
  );

  row_grad_fpga u_fragf (
    .clk, .rst_n,
    .in_valid(fragf_in_valid), .in_pix(fragf_in_pix),
    .out_valid(fragf_out_valid), .out_sum(fragf_out_sum)
  );

  row_grad_mppa u_fragm (
    .clk, .rst_n,
    .in_valid(fragm_in_valid), .in_ready(fragm_in_ready), .in_data(fragm_in_data),
    .out_valid(fragm_out_valid), .out_ready(fragm_out_ready), .out_data(fragm_out_data),
    .op_count(fragm_op_count)
  );
endmodule
