// tb_row_grad_fpga: streams random pixels with random gaps into the FPGA
// row-gradient fragment and checks that each one yields p[n]+2p[n-1]+p[n-2]
// (zeros before the first pixel) two clocks after it is presented, so that a
// gap-free burst gives one result per clock.
module tb_row_grad_fpga;
  import sobel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  pix_t in_pix = '0;
  logic out_valid;
  logic [PIX_W+1:0] out_sum;
  int checks = 0, failures = 0;
  int exp_q [$];
  int h1 = 0, h2 = 0, n_out = 0, n_in = 0;
  bit vhist = 1'b0;

  row_grad_fpga dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== vhist) begin failures++; $display("latency wrong"); end
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0 || int'(out_sum) != exp_q[0]) begin
          failures++; if (failures < 10) $display("sum %0d want %0d", out_sum, exp_q[0]);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n_out++;
      end
      vhist = in_valid;
    end
  end

  initial begin
    int p;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = (i < 300) || ($urandom_range(0, 2) != 0);
      if (in_valid) begin
        p = $urandom_range(0, 255);
        if (i == 5) p = 255;  // a run of 255s reaches the largest sum, 1020
        if (i == 6 || i == 7) p = 255;
        in_pix = pix_t'(p);
        exp_q.push_back(p + 2*h1 + h2);
        h2 = h1; h1 = p;
        n_in++;
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("%0d in, %0d out", n_in, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
