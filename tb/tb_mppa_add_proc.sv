// tb_mppa_add_proc: feeds random word pairs to the adder processor through
// two channel-style sources and checks every sum and its order. With both
// inputs always ready and the output always taken, a sum must leave every
// four clocks and the add must be busy one clock in four; with random stalls
// the sums must still be right.
module tb_mppa_add_proc;
  import sobel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_valid = 1'b0, a_ready, b_valid = 1'b0, b_ready, out_valid, out_ready = 1'b0, busy_op;
  word_t a_data = '0, b_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t a_q [$], b_q [$], exp_q [$];
  bit a_acc = 1'b0, b_acc = 1'b0, stall_mode = 1'b0;
  int n_out = 0, last_t = 0, n_p4 = 0, n_pbad = 0, n_busy = 0, n_clk = 0;

  mppa_add_proc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!a_valid || a_acc) begin
        if (a_q.size() > 0 && (!stall_mode || $urandom_range(0, 2) == 0)) begin a_valid = 1'b1; a_data = a_q.pop_front(); end
        else a_valid = 1'b0;
      end
      if (!b_valid || b_acc) begin
        if (b_q.size() > 0 && (!stall_mode || $urandom_range(0, 2) == 0)) begin b_valid = 1'b1; b_data = b_q.pop_front(); end
        else b_valid = 1'b0;
      end
      out_ready = !stall_mode || ($urandom_range(0, 2) == 0);
    end
  end

  always @(posedge clk) begin
    a_acc <= a_valid && a_ready;
    b_acc <= b_valid && b_ready;
    if (rst_n && !stall_mode && n_out >= 1 && n_out < 50) begin
      n_clk++;
      if (busy_op) n_busy++;
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++; if (failures < 10) $display("sum %0h want %0h", out_data, exp_q[0]);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      if (!stall_mode && last_t != 0) begin
        if (($time - last_t) / 10 == 4) n_p4++; else n_pbad++;
      end
      last_t = $time;
    end
  end

  initial begin
    word_t x, y;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 50; i++) begin
      x = $urandom; y = $urandom;
      a_q.push_back(x); b_q.push_back(y); exp_q.push_back(x + y);
    end
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (n_pbad != 0 || n_p4 != 49) begin failures++; $display("periods: %0d of 4, %0d other", n_p4, n_pbad); end
    checks++;
    if (n_clk != 4 * 49 || n_busy != 49) begin failures++; $display("busy %0d of %0d clocks", n_busy, n_clk); end
    stall_mode = 1'b1;
    for (int i = 0; i < 200; i++) begin
      x = $urandom; y = $urandom;
      a_q.push_back(x); b_q.push_back(y); exp_q.push_back(x + y);
    end
    wait (exp_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
