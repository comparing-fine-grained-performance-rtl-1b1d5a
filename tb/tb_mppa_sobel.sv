// tb_mppa_sobel: runs two small random frames through the two-stage MPPA
// Sobel dataflow, the first with random source gaps and sink back-pressure,
// the second with neither. Results are compared with a model of the two
// processor loops (row merging, then the 3x3 shift-register Sobel loop, whose
// state carries over between rows and frames). In the second frame results
// must leave every 44 clocks, the Sobel stage's iteration time, and the
// input channel must have refused the source at least once.
module tb_mppa_sobel;
  import sobel_pkg::*;
  localparam int unsigned W = 6, H = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t src_q [$];
  int exp_q [$];
  bit acc_q = 1'b0, stall_mode = 1'b1;
  int n_out = 0, last_t = 0, n_period_ok = 0, n_period_bad = 0, n_refused = 0;
  int P [9];

  mppa_sobel #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || acc_q) begin
        if (src_q.size() > 0 && (!stall_mode || $urandom_range(0, 3) == 0)) begin
          in_valid = 1'b1; in_data = src_q.pop_front();
        end else in_valid = 1'b0;
      end
      out_ready = !stall_mode || ($urandom_range(0, 5) == 0);
    end
  end

  always @(posedge clk) begin
    acc_q <= in_valid && in_ready;
    if (rst_n && in_valid && !in_ready) n_refused++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_data) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("result %0d: got %0d want %0d", n_out, out_data, exp_q[0]);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      if (!stall_mode && last_t != 0) begin
        if (($time - last_t) / 10 == 44) n_period_ok++; else n_period_bad++;
      end
      last_t = $time;
    end
  end

  task automatic column(int top, int mid, int bot);
    int px, py;
    P[0] = P[1]; P[1] = P[2]; P[2] = top;
    P[3] = P[4]; P[4] = P[5]; P[5] = mid;
    P[6] = P[7]; P[7] = P[8]; P[8] = bot;
    px = (P[2] + P[5]*2 + P[8]) - (P[0] + P[3]*2 + P[6]);
    py = (P[0] + P[1]*2 + P[2]) - (P[6] + P[7]*2 + P[8]);
    if (px < 0) px = -px;
    if (py < 0) py = -py;
    exp_q.push_back(px + py);
  endtask

  task automatic frame();
    int img [H][W];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = $urandom_range(0, 255);
        src_q.push_back(word_t'(img[r][c]));
        if (r >= 2) column(img[r-2][c], img[r-1][c], img[r][c]);
      end
  endtask

  initial begin
    P = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    frame();
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    stall_mode = 1'b0;
    last_t = 0;
    n_refused = 0;
    frame();
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != 2 * W * (H - 2)) begin failures++; $display("%0d results", n_out); end
    checks++;
    if (n_period_bad != 0 || n_period_ok != W * (H - 2) - 1) begin
      failures++; $display("periods: %0d of 44 clocks, %0d otherwise", n_period_ok, n_period_bad);
    end
    checks++;
    if (n_refused == 0) begin failures++; $display("input channel never blocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
