// tb_row_grad_mppa: streams random pixels into the five-processor MPPA
// row-gradient fragment, first with random source gaps and sink
// back-pressure, then with neither. Every result must equal
// p[n]+2p[n-1]+p[n-2] (zeros before the first pixel). Unstalled, results must
// leave every four clocks and each of the three computing processors must
// spend one clock in four on arithmetic (three operations per result).
module tb_row_grad_mppa;
  import sobel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  logic [31:0] op_count;
  int checks = 0, failures = 0;
  word_t src_q [$];
  int exp_q [$];
  bit acc_q = 1'b0, stall_mode = 1'b1;
  int n_out = 0, last_t = 0, n_p4 = 0, n_pbad = 0, h1 = 0, h2 = 0;

  row_grad_mppa dut (.*);

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
        if (src_q.size() > 0 && (!stall_mode || $urandom_range(0, 2) == 0)) begin
          in_valid = 1'b1; in_data = src_q.pop_front();
        end else in_valid = 1'b0;
      end
      out_ready = !stall_mode || ($urandom_range(0, 2) == 0);
    end
  end

  always @(posedge clk) begin
    acc_q <= in_valid && in_ready;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_data) != exp_q[0]) begin
        failures++; if (failures < 10) $display("result %0d: %0d want %0d", n_out, out_data, exp_q[0]);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      if (!stall_mode && last_t != 0) begin
        if (($time - last_t) / 10 == 4) n_p4++; else n_pbad++;
      end
      last_t = $time;
    end
  end

  task automatic feed(int n);
    int p;
    for (int k = 0; k < n; k++) begin
      p = $urandom_range(0, 255);
      src_q.push_back(word_t'(p));
      exp_q.push_back(p + 2*h1 + h2);
      h2 = h1; h1 = p;
    end
  endtask

  initial begin
    int ops0, t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    feed(300);
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    stall_mode = 1'b0;
    last_t = 0;
    checks++;
    if (op_count != 32'(3 * 300)) begin failures++; $display("%0d operations for 300 results", op_count); end
    feed(200);
    // Measure the arithmetic share over 100 results in the steady state.
    wait (n_out == 350);
    ops0 = int'(op_count); t0 = $time;
    wait (n_out == 450);
    t1 = $time;
    checks++;
    if ((int'(op_count) - ops0) != 300 || (t1 - t0) / 10 != 400) begin
      failures++; $display("%0d operations in %0d clocks", int'(op_count) - ops0, (t1 - t0) / 10);
    end else
      $display("each computing processor busy %0d%% of clocks", 100 * (int'(op_count) - ops0) / (3 * (t1 - t0) / 10));
    wait (exp_q.size() == 0);
    checks++;
    if (n_pbad != 0 || n_p4 != 199) begin failures++; $display("periods %0d of 4, %0d other", n_p4, n_pbad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
