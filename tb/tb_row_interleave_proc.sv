// tb_row_interleave_proc: feeds two small random frames into the row
// interleaving stage through a channel-style source with random gaps and a
// sink with random back-pressure. From the third row on, every pixel must
// produce the words top, middle, bottom of its column, in order; the first
// two rows produce nothing. With no stalls an iteration must take four
// clocks (one read, three writes).
module tb_row_interleave_proc;
  import sobel_pkg::*;
  localparam int unsigned W = 6, H = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t src_q [$], exp_q [$];
  bit acc_q = 1'b0, stall_mode = 1'b1;
  int n_out = 0, last_t = 0, n_gap4 = 0, n_gap_other = 0;

  row_interleave_proc #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || acc_q) begin
        if (src_q.size() > 0 && (!stall_mode || $urandom_range(0, 2) != 0)) begin
          in_valid = 1'b1; in_data = src_q.pop_front();
        end else in_valid = 1'b0;
      end
      out_ready = !stall_mode || ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    acc_q <= in_valid && in_ready;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d", n_out, out_data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
      // time between first words of consecutive triples
      if (n_out % 3 == 1) begin
        if (!stall_mode && last_t != 0) begin
          if (($time - last_t) / 10 == 4) n_gap4++; else n_gap_other++;
        end
        last_t = $time;
      end
    end
  end

  task automatic frame();
    int img [H][W];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = $urandom_range(0, 255);
        src_q.push_back(word_t'(img[r][c]));
        if (r >= 2) begin
          exp_q.push_back(word_t'(img[r-2][c]));
          exp_q.push_back(word_t'(img[r-1][c]));
          exp_q.push_back(word_t'(img[r][c]));
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    frame();
    wait (src_q.size() == 0 && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    stall_mode = 1'b0;
    last_t = 0;
    frame();
    wait (src_q.size() == 0 && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != 2 * 3 * W * (H - 2)) begin failures++; $display("%0d words", n_out); end
    checks++;
    if (n_gap_other != 0 || n_gap4 == 0) begin
      failures++; $display("unstalled iterations: %0d of 4 clocks, %0d otherwise", n_gap4, n_gap_other);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
