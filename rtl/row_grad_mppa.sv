// row_grad_mppa: the MPPA form of the row-gradient fragment,
// p[n] + 2*p[n-1] + p[n-2], built from five channel-connected processors.
//
//   in -> s1 (x1) -> s2 (x2) -> s3 (x1)
//          |          |          |
//          +--> a1 <--+          |
//               a1 ------> a2 <--+ -> out
//
// s1 forwards each pixel to s2 and to the first adder a1. s2 forwards its
// captive (previous) pixel to s3 and sends twice that pixel to a1. s3 sends its
// captive pixel to the second adder a2, which also takes a1's sum. Every link is
// a 2-word blocking ambric_channel. Each processor does one read, write or
// arithmetic operation per clock, so s2, a1 and a2 need four clocks per pixel
// and set the rate at one result every four clocks; their arithmetic takes one
// clock of those four. op_count counts the arithmetic operations performed
// (three per result), which the user can compare with the elapsed clocks.
//
// Interface: in_*/out_* blocking channels (valid/ready/32-bit). Captive
// pixels start at zero, so the first two results see zeros for the missing
// earlier pixels. The processor graph follows the MPPA fragment; the channel
// signalling and the counter are this design's.
module row_grad_mppa
  import sobel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic [31:0] op_count
);
  // Channel ends: <name>_wv/_wr/_wd on the writer side, _rv/_rr/_rd on the reader side.
  typedef struct packed {
    logic  wv;  logic wr;  word_t wd;
    logic  rv;  logic rr;  word_t rd;
  } link_t;

  link_t l_in, l_12, l_1a, l_23, l_2a, l_3a, l_aa, l_out;
  logic  op2, op_a1, op_a2;

  assign l_in.wv  = in_valid;
  assign in_ready = l_in.wr;
  assign l_in.wd  = in_data;
  assign out_valid  = l_out.rv;
  assign l_out.rr   = out_ready;
  assign out_data   = l_out.rd;

  ambric_channel u_c_in  (.clk, .rst_n, .in_valid(l_in.wv),  .in_ready(l_in.wr),  .in_data(l_in.wd),
                          .out_valid(l_in.rv),  .out_ready(l_in.rr),  .out_data(l_in.rd));
  ambric_channel u_c_12  (.clk, .rst_n, .in_valid(l_12.wv),  .in_ready(l_12.wr),  .in_data(l_12.wd),
                          .out_valid(l_12.rv),  .out_ready(l_12.rr),  .out_data(l_12.rd));
  ambric_channel u_c_1a  (.clk, .rst_n, .in_valid(l_1a.wv),  .in_ready(l_1a.wr),  .in_data(l_1a.wd),
                          .out_valid(l_1a.rv),  .out_ready(l_1a.rr),  .out_data(l_1a.rd));
  ambric_channel u_c_23  (.clk, .rst_n, .in_valid(l_23.wv),  .in_ready(l_23.wr),  .in_data(l_23.wd),
                          .out_valid(l_23.rv),  .out_ready(l_23.rr),  .out_data(l_23.rd));
  ambric_channel u_c_2a  (.clk, .rst_n, .in_valid(l_2a.wv),  .in_ready(l_2a.wr),  .in_data(l_2a.wd),
                          .out_valid(l_2a.rv),  .out_ready(l_2a.rr),  .out_data(l_2a.rd));
  ambric_channel u_c_3a  (.clk, .rst_n, .in_valid(l_3a.wv),  .in_ready(l_3a.wr),  .in_data(l_3a.wd),
                          .out_valid(l_3a.rv),  .out_ready(l_3a.rr),  .out_data(l_3a.rd));
  ambric_channel u_c_aa  (.clk, .rst_n, .in_valid(l_aa.wv),  .in_ready(l_aa.wr),  .in_data(l_aa.wd),
                          .out_valid(l_aa.rv),  .out_ready(l_aa.rr),  .out_data(l_aa.rd));
  ambric_channel u_c_out (.clk, .rst_n, .in_valid(l_out.wv), .in_ready(l_out.wr), .in_data(l_out.wd),
                          .out_valid(l_out.rv), .out_ready(l_out.rr), .out_data(l_out.rd));

  mppa_stage_proc #(.PASS(1'b1), .CAPTIVE(1'b0), .DOUBLE(1'b0)) u_s1 (
    .clk, .rst_n,
    .in_valid(l_in.rv), .in_ready(l_in.rr), .in_data(l_in.rd),
    .fwd_valid(l_12.wv), .fwd_ready(l_12.wr), .fwd_data(l_12.wd),
    .add_valid(l_1a.wv), .add_ready(l_1a.wr), .add_data(l_1a.wd),
    .busy_op()
  );
  mppa_stage_proc #(.PASS(1'b1), .CAPTIVE(1'b1), .DOUBLE(1'b1)) u_s2 (
    .clk, .rst_n,
    .in_valid(l_12.rv), .in_ready(l_12.rr), .in_data(l_12.rd),
    .fwd_valid(l_23.wv), .fwd_ready(l_23.wr), .fwd_data(l_23.wd),
    .add_valid(l_2a.wv), .add_ready(l_2a.wr), .add_data(l_2a.wd),
    .busy_op(op2)
  );
  mppa_stage_proc #(.PASS(1'b0), .CAPTIVE(1'b1), .DOUBLE(1'b0)) u_s3 (
    .clk, .rst_n,
    .in_valid(l_23.rv), .in_ready(l_23.rr), .in_data(l_23.rd),
    .fwd_valid(), .fwd_ready(1'b0), .fwd_data(),
    .add_valid(l_3a.wv), .add_ready(l_3a.wr), .add_data(l_3a.wd),
    .busy_op()
  );
  mppa_add_proc u_a1 (
    .clk, .rst_n,
    .a_valid(l_1a.rv), .a_ready(l_1a.rr), .a_data(l_1a.rd),
    .b_valid(l_2a.rv), .b_ready(l_2a.rr), .b_data(l_2a.rd),
    .out_valid(l_aa.wv), .out_ready(l_aa.wr), .out_data(l_aa.wd),
    .busy_op(op_a1)
  );
  mppa_add_proc u_a2 (
    .clk, .rst_n,
    .a_valid(l_aa.rv), .a_ready(l_aa.rr), .a_data(l_aa.rd),
    .b_valid(l_3a.rv), .b_ready(l_3a.rr), .b_data(l_3a.rd),
    .out_valid(l_out.wv), .out_ready(l_out.wr), .out_data(l_out.wd),
    .busy_op(op_a2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) op_count <= '0;
    else        op_count <= op_count + 32'(op2) + 32'(op_a1) + 32'(op_a2);
  end
endmodule
