// mppa_sobel: the first, two-stage MPPA Sobel dataflow as hardware.
//
// An input channel feeds row_interleave_proc, which aligns three image rows
// with two delay lines and writes them merged, three words per column, on one
// channel; sobel_kernel_proc reads those words, computes |Gx|+|Gy| and writes
// one result per column to the output channel. All links are 2-word blocking
// ambric_channel instances, so each stage runs at its own pace and stalls on
// an empty or full channel. Per IMG_W x IMG_H frame it produces
// (IMG_H-2)*IMG_W results, the first two of each row mixing in the previous
// row's last columns. With the default KERNEL_CYCLES the Sobel stage sets the
// rate at 44 clocks per result.
//
// Interface: in_* (pixel in the low 8 bits) and out_* (result in the low 11
// bits) are blocking channels with valid/ready. The two-stage structure
// follows the MPPA implementation; the channel signalling is this design's.
module mppa_sobel
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W         = 512,
  parameter int unsigned IMG_H         = 512,
  parameter int unsigned KERNEL_CYCLES = 44
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data
);
  logic  a_valid, a_ready;  word_t a_data;   // input channel -> interleave
  logic  b_valid, b_ready;  word_t b_data;   // interleave -> channel
  logic  c_valid, c_ready;  word_t c_data;   // channel -> kernel
  logic  d_valid, d_ready;  word_t d_data;   // kernel -> output channel

  ambric_channel #(.WIDTH(WORD_W), .DEPTH(2)) u_ch_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data)
  );

  row_interleave_proc #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fifo_proc (
    .clk, .rst_n,
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
  );

  ambric_channel #(.WIDTH(WORD_W), .DEPTH(2)) u_ch_rows (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

  sobel_kernel_proc #(.KERNEL_CYCLES(KERNEL_CYCLES)) u_sobel_proc (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data)
  );

  ambric_channel #(.WIDTH(WORD_W), .DEPTH(2)) u_ch_out (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid, .out_ready, .out_data
  );
endmodule
