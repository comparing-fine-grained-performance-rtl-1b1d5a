// tb_mppa_stage_proc: drives the three staging-processor configurations of
// the row-gradient fragment with the same random pixel stream, each through
// its own channel-style source and sinks with random back-pressure, and
// checks the words each one forwards and sends to its adder:
//   first  x1 (PASS, no CAPTIVE, no DOUBLE): forwards p[n], sends p[n]
//   middle x2 (PASS, CAPTIVE, DOUBLE)      : forwards p[n-1], sends 2*p[n-1]
//   last   x1 (no PASS, CAPTIVE)           : sends p[n-1], never forwards
// With no stalls the iterations must take 3, 4 and 2 clocks, and only the
// middle one may report an arithmetic operation, once per iteration.
module tb_mppa_stage_proc;
  import sobel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  in_valid [3], in_ready [3], fwd_valid [3], fwd_ready [3], add_valid [3], add_ready [3], busy_op [3];
  word_t in_data [3], fwd_data [3], add_data [3];
  int checks = 0, failures = 0;
  word_t src_q [3][$], fwd_exp [3][$], add_exp [3][$];
  bit acc [3];
  bit stall_mode = 1'b1;
  int n_add [3], last_t [3], n_pok [3], n_pbad [3], n_busy [3];
  int period [3] = '{3, 4, 2};

  mppa_stage_proc #(.PASS(1'b1), .CAPTIVE(1'b0), .DOUBLE(1'b0)) dut0 (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_data(in_data[0]),
    .fwd_valid(fwd_valid[0]), .fwd_ready(fwd_ready[0]), .fwd_data(fwd_data[0]),
    .add_valid(add_valid[0]), .add_ready(add_ready[0]), .add_data(add_data[0]), .busy_op(busy_op[0]));
  mppa_stage_proc #(.PASS(1'b1), .CAPTIVE(1'b1), .DOUBLE(1'b1)) dut1 (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_data(in_data[1]),
    .fwd_valid(fwd_valid[1]), .fwd_ready(fwd_ready[1]), .fwd_data(fwd_data[1]),
    .add_valid(add_valid[1]), .add_ready(add_ready[1]), .add_data(add_data[1]), .busy_op(busy_op[1]));
  mppa_stage_proc #(.PASS(1'b0), .CAPTIVE(1'b1), .DOUBLE(1'b0)) dut2 (
    .clk, .rst_n, .in_valid(in_valid[2]), .in_ready(in_ready[2]), .in_data(in_data[2]),
    .fwd_valid(fwd_valid[2]), .fwd_ready(fwd_ready[2]), .fwd_data(fwd_data[2]),
    .add_valid(add_valid[2]), .add_ready(add_ready[2]), .add_data(add_data[2]), .busy_op(busy_op[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      in_valid[i] = 1'b0; in_data[i] = '0; fwd_ready[i] = 1'b0; add_ready[i] = 1'b0;
      acc[i] = 1'b0; n_add[i] = 0; last_t[i] = 0; n_pok[i] = 0; n_pbad[i] = 0; n_busy[i] = 0;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (!in_valid[i] || acc[i]) begin
          if (src_q[i].size() > 0 && (!stall_mode || $urandom_range(0, 2) == 0)) begin
            in_valid[i] = 1'b1; in_data[i] = src_q[i].pop_front();
          end else in_valid[i] = 1'b0;
        end
        fwd_ready[i] = !stall_mode || ($urandom_range(0, 2) == 0);
        add_ready[i] = !stall_mode || ($urandom_range(0, 2) == 0);
      end
    end
  end

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      acc[i] <= in_valid[i] && in_ready[i];
      if (rst_n) begin
        if (busy_op[i] && !stall_mode) n_busy[i]++;
        if (fwd_valid[i] && fwd_ready[i]) begin
          checks++;
          if (fwd_exp[i].size() == 0 || fwd_data[i] !== fwd_exp[i][0]) begin
            failures++; if (failures < 10) $display("stage %0d forward %0d", i, fwd_data[i]);
          end
          if (fwd_exp[i].size() != 0) void'(fwd_exp[i].pop_front());
        end
        if (add_valid[i] && add_ready[i]) begin
          checks++;
          if (add_exp[i].size() == 0 || add_data[i] !== add_exp[i][0]) begin
            failures++; if (failures < 10) $display("stage %0d adder word %0d", i, add_data[i]);
          end
          if (add_exp[i].size() != 0) void'(add_exp[i].pop_front());
          n_add[i]++;
          if (!stall_mode && last_t[i] != 0) begin
            if (($time - last_t[i]) / 10 == period[i]) n_pok[i]++; else n_pbad[i]++;
          end
          last_t[i] = $time;
        end
      end
    end
  end

  task automatic feed(int n);
    word_t prev = '0, x;
    for (int k = 0; k < n; k++) begin
      x = word_t'($urandom_range(0, 255));
      for (int i = 0; i < 3; i++) src_q[i].push_back(x);
      fwd_exp[0].push_back(x);   add_exp[0].push_back(x);
      fwd_exp[1].push_back(prev); add_exp[1].push_back(prev << 1);
      add_exp[2].push_back(prev);
      prev = x;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    feed(200);
    wait (add_exp[0].size() == 0 && add_exp[1].size() == 0 && add_exp[2].size() == 0);
    repeat (3) @(posedge clk);
    // The captive pixels now hold the last pixel of the first run.
    stall_mode = 1'b0;
    for (int i = 0; i < 3; i++) begin last_t[i] = 0; n_busy[i] = 0; end
    begin
      word_t prev, x;
      prev = in_data[0];
      for (int k = 0; k < 50; k++) begin
        x = word_t'($urandom_range(0, 255));
        for (int i = 0; i < 3; i++) src_q[i].push_back(x);
        fwd_exp[0].push_back(x);   add_exp[0].push_back(x);
        fwd_exp[1].push_back(prev); add_exp[1].push_back(prev << 1);
        add_exp[2].push_back(prev);
        prev = x;
      end
    end
    wait (add_exp[0].size() == 0 && add_exp[1].size() == 0 && add_exp[2].size() == 0);
    repeat (3) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_pbad[i] != 0 || n_pok[i] != 49) begin
        failures++; $display("stage %0d: %0d periods of %0d clocks, %0d other", i, n_pok[i], period[i], n_pbad[i]);
      end
      checks++;
      if (n_busy[i] != (i == 1 ? 50 : 0)) begin failures++; $display("stage %0d: %0d operations", i, n_busy[i]); end
    end
    checks++;
    for (int i = 0; i < 3; i++) if (fwd_exp[i].size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
