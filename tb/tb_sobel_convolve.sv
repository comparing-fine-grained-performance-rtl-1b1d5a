// tb_sobel_convolve: drives the convolve block with hand-worked and random
// 3x3 neighbourhoods and compares the registered |Gx|+|Gy| with an integer
// reference one clock later; checks the border zeroing and the enable.
module tb_sobel_convolve;
  import sobel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, zero = 1'b0;
  win_t win = '0;
  mag_t mag;
  int checks = 0, failures = 0;

  sobel_convolve dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mag(input int p[9]);
    // p[0..2] top row left..right, p[3..5] middle, p[6..8] bottom
    int gx, gy;
    gx = (p[2] + 2*p[5] + p[8]) - (p[0] + 2*p[3] + p[6]);
    gy = (p[0] + 2*p[1] + p[2]) - (p[6] + 2*p[7] + p[8]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  task automatic apply(input int p[9], input bit z, input bit e, input int expect_val);
    mag_t prev_mag;
    @(negedge clk);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win[r][c] = pix_t'(p[3*r+c]);
    zero = z;
    en   = e;
    prev_mag = mag;
    @(posedge clk);
    #1;
    checks++;
    if (!e) begin
      if (mag !== prev_mag) begin failures++; $display("changed without enable"); end
    end else if (int'(mag) != expect_val) begin
      failures++;
      $display("mag %0d want %0d", mag, expect_val);
    end
  endtask

  initial begin
    int p[9];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // Vertical edge: left column 0, right column 255 -> |Gx| = 1020, Gy = 0.
    p = '{0, 0, 255, 0, 0, 255, 0, 0, 255};
    apply(p, 1'b0, 1'b1, 1020);
    // Horizontal edge, top bright: Gy = 1020.
    p = '{255, 255, 255, 0, 0, 0, 0, 0, 0};
    apply(p, 1'b0, 1'b1, 1020);
    // Diagonal edge: |Gx| = |Gy| = 765, the largest possible sum, 1530.
    p = '{0, 255, 255, 0, 0, 255, 0, 0, 0};
    apply(p, 1'b0, 1'b1, 1530);
    // Flat patch: 0.
    p = '{77, 77, 77, 77, 77, 77, 77, 77, 77};
    apply(p, 1'b0, 1'b1, 0);
    // Border zeroing.
    p = '{0, 0, 255, 0, 0, 255, 0, 0, 255};
    apply(p, 1'b1, 1'b1, 0);
    // Hold when not enabled.
    p = '{9, 1, 200, 3, 4, 5, 6, 7, 8};
    apply(p, 1'b0, 1'b0, 0);
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 9; k++) p[k] = $urandom_range(0, 255);
      apply(p, 1'b0, 1'b1, ref_mag(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
