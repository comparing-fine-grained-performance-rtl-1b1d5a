// tb_sobel_fpga: streams three random frames (one with no gaps, two with
// random gaps) into the one-pixel-per-clock Sobel pipeline. It checks that
// every accepted pixel yields exactly one result two clocks later, that the
// result equals an integer |Gx|+|Gy| reference centred one row up and one
// column left, and that border results are zero and flagged. The gap-free
// frame must finish in W*H clocks plus the 2-clock latency.
module tb_sobel_fpga;
  import sobel_pkg::*;
  localparam int unsigned W = 12, H = 7;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  pix_t in_pix = '0;
  logic out_valid, out_border;
  mag_t out_mag;
  int checks = 0, failures = 0;
  int img [H][W];
  int exp_mag [$];
  bit exp_border [$];
  logic [1:0] vhist = '0;
  int n_in = 0, n_out = 0, n_border = 0;

  sobel_fpga #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_at(int r, int c);  // centre (r, c)
    int gx, gy;
    gx = (img[r-1][c+1] + 2*img[r][c+1] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r][c-1] + img[r+1][c-1]);
    gy = (img[r-1][c-1] + 2*img[r-1][c] + img[r-1][c+1]) - (img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  // Output monitor: out_valid must follow in_valid by exactly two clocks.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== vhist[0]) begin failures++; $display("out_valid latency wrong"); end
      if (out_valid) begin
        n_out++;
        if (exp_mag.size() == 0) begin failures++; $display("unexpected output"); end
        else begin
          int e; bit b;
          e = exp_mag.pop_front(); b = exp_border.pop_front();
          checks++;
          if (int'(out_mag) != e || out_border !== b) begin
            failures++;
            if (failures < 10) $display("out %0d/%0b want %0d/%0b", out_mag, out_border, e, b);
          end
          if (b) n_border++;
        end
      end
      vhist = {vhist[0], in_valid};
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = $urandom_range(0, 255);
      if (f == 1) begin  // a flat frame with one vertical step edge
        for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = (c >= W/2) ? 200 : 10;
      end
      t0 = $time;
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          while (f != 1 && $urandom_range(0, 3) == 0) begin
            @(negedge clk); in_valid = 1'b0;
          end
          @(negedge clk);
          in_valid = 1'b1; in_pix = pix_t'(img[r][c]);
          n_in++;
          if (r < 2 || c < 2) begin exp_mag.push_back(0); exp_border.push_back(1'b1); end
          else begin exp_mag.push_back(ref_at(r-1, c-1)); exp_border.push_back(1'b0); end
        end
      end
      @(negedge clk); in_valid = 1'b0;
      if (f == 1) begin
        checks++;
        if (($time - t0) / 10 != W*H + 1) begin
          failures++; $display("gap-free frame took %0d clocks", ($time - t0) / 10);
        end
      end
      repeat (4) @(negedge clk);
      checks++;
      if (exp_mag.size() != 0) begin failures++; $display("%0d results missing", exp_mag.size()); end
    end
    checks++;
    if (n_out != n_in || n_border == 0) failures++;
    $display("pixels in %0d, results %0d, border results %0d", n_in, n_out, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
