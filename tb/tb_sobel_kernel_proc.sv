// tb_sobel_kernel_proc: feeds random column triples to the Sobel stage and
// compares each result with a model of the processor loop: three shift
// registers of three pixels, Px = right - left column and Py = top - bottom
// row with weights 1,2,1, result |Px|+|Py|. With input always available and
// the output always taken, results must leave exactly KERNEL_CYCLES (44)
// clocks apart; with random stalls the results must still be right.
module tb_sobel_kernel_proc;
  import sobel_pkg::*;
  localparam int unsigned KC = 44;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t src_q [$];
  int exp_q [$];
  bit acc_q = 1'b0, stall_mode = 1'b0;
  int n_out = 0, last_t = 0, n_period_ok = 0, n_period_bad = 0;
  int P [9];

  sobel_kernel_proc #(.KERNEL_CYCLES(KC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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
      out_ready = !stall_mode || ($urandom_range(0, 3) == 0);
    end
  end

  always @(posedge clk) begin
    acc_q <= in_valid && in_ready;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_data) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("result %0d: got %0d want %0d", n_out, out_data, exp_q[0]);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      if (!stall_mode && last_t != 0) begin
        if (($time - last_t) / 10 == KC) n_period_ok++; else n_period_bad++;
      end
      last_t = $time;
    end
  end

  task automatic column(int top, int mid, int bot);
    int px, py;
    src_q.push_back(word_t'(top)); src_q.push_back(word_t'(mid)); src_q.push_back(word_t'(bot));
    P[0] = P[1]; P[1] = P[2]; P[2] = top;
    P[3] = P[4]; P[4] = P[5]; P[5] = mid;
    P[6] = P[7]; P[7] = P[8]; P[8] = bot;
    px = (P[2] + P[5]*2 + P[8]) - (P[0] + P[3]*2 + P[6]);
    py = (P[0] + P[1]*2 + P[2]) - (P[6] + P[7]*2 + P[8]);
    if (px < 0) px = -px;
    if (py < 0) py = -py;
    exp_q.push_back(px + py);
  endtask

  initial begin
    P = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 40; i++) column($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    wait (exp_q.size() == 0);
    stall_mode = 1'b1;
    for (int i = 0; i < 100; i++) column($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_period_bad != 0 || n_period_ok != 39) begin
      failures++; $display("periods: %0d of %0d clocks, %0d otherwise", n_period_ok, KC, n_period_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
