// tb_sobel_window: streams two small random frames with random gaps into
// sobel_window and checks, after every accepted pixel, the reported row and
// column and, wherever the 3x3 window lies inside the image, all nine pixels
// against the frame held in the testbench.
module tb_sobel_window;
  import sobel_pkg::*;
  localparam int unsigned W = 8, H = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pix_t pix = '0;
  win_t win;
  logic [$clog2(H+1)-1:0] row;
  logic [$clog2(W+1)-1:0] col;
  int checks = 0, failures = 0;
  int img [H][W];

  sobel_window #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = $urandom_range(0, 255);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          // random idle cycles
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk); en = 1'b0;
          end
          @(negedge clk);
          en = 1'b1; pix = pix_t'(img[r][c]);
          @(posedge clk); #1;
          en = 1'b0;
          checks++;
          if (int'(row) != r || int'(col) != c) begin
            failures++; $display("pos %0d,%0d reported %0d,%0d", r, c, row, col);
          end
          if (r >= 2 && c >= 2) begin
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++) begin
                checks++;
                if (int'(win[i][j]) != img[r-2+i][c-2+j]) begin
                  failures++;
                  if (failures < 10) $display("win[%0d][%0d] at %0d,%0d = %0d want %0d", i, j, r, c, win[i][j], img[r-2+i][c-2+j]);
                end
              end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
