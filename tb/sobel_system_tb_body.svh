// Shared body of the end-to-end testbenches of sobel_system. The including
// module declares W, H (image size), GAPS (1: random input gaps on the FPGA
// pipeline) and WATCHDOG (clocks), instantiates the top as 'dut' and then
// includes this file; the including module also holds the watchdog.
//
// It runs the four parts at once:
//  - FPGA pipeline: two frames, the first without gaps (must take W*H
//    clocks), checked pixel by pixel against an integer |Gx|+|Gy| model.
//  - MPPA dataflow: one frame, checked against a model of the two processor
//    loops; unstalled results must leave every 44 clocks.
//  - both row-gradient fragments: the same 200 pixels, checked against
//    p[n]+2p[n-1]+p[n-2].
// Each mechanism is counted and must occur at least once: border zeros,
// interior results, a blocked MPPA input channel, MPPA output back-pressure,
// a blocked fragment input channel, and the 25% arithmetic share of the
// fragment's processors.

  logic clk = 1'b0, rst_n = 1'b0;
  logic fpga_in_valid = 1'b0, fpga_out_valid, fpga_out_border;
  pix_t fpga_in_pix = '0;
  mag_t fpga_out_mag;
  logic mppa_in_valid = 1'b0, mppa_in_ready, mppa_out_valid, mppa_out_ready = 1'b0;
  word_t mppa_in_data = '0, mppa_out_data;
  logic fragf_in_valid = 1'b0, fragf_out_valid;
  pix_t fragf_in_pix = '0;
  logic [PIX_W+1:0] fragf_out_sum;
  logic fragm_in_valid = 1'b0, fragm_in_ready, fragm_out_valid, fragm_out_ready = 1'b0;
  word_t fragm_in_data = '0, fragm_out_data;
  logic [31:0] fragm_op_count;

  int checks = 0, failures = 0;
  byte unsigned img [H][W];
  int P [9];
  int fq [$], mq [$], gq_f [$], gq_m [$];
  bit fb [$];
  word_t msrc [$], gsrc [$];
  bit macc = 1'b0, gacc = 1'b0, frames_done = 1'b0;
  // mechanism counters
  int n_border = 0, n_interior = 0, n_m_blocked = 0, n_m_backpressure = 0, n_m_out = 0;
  int n_g_blocked = 0, n_gf_out = 0, n_gm_out = 0, n_m_p44 = 0, n_m_pother = 0, m_last_t = 0;
  int f_frame_clocks = 0;

  always #5 clk = ~clk;

  function automatic int ref_at(int r, int c);
    int gx, gy;
    gx = (img[r-1][c+1] + 2*img[r][c+1] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r][c-1] + img[r+1][c-1]);
    gy = (img[r-1][c-1] + 2*img[r-1][c] + img[r-1][c+1]) - (img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  task automatic column(int top, int mid, int bot);
    int px, py;
    P[0] = P[1]; P[1] = P[2]; P[2] = top;
    P[3] = P[4]; P[4] = P[5]; P[5] = mid;
    P[6] = P[7]; P[7] = P[8]; P[8] = bot;
    px = (P[2] + P[5]*2 + P[8]) - (P[0] + P[3]*2 + P[6]);
    py = (P[0] + P[1]*2 + P[2]) - (P[6] + P[7]*2 + P[8]);
    if (px < 0) px = -px;
    if (py < 0) py = -py;
    mq.push_back(px + py);
  endtask

  // Channel-style drivers for the MPPA ports.
  always @(negedge clk) begin
    if (rst_n) begin
      if (!mppa_in_valid || macc) begin
        if (msrc.size() > 0) begin mppa_in_valid = 1'b1; mppa_in_data = msrc.pop_front(); end
        else mppa_in_valid = 1'b0;
      end
      if (!fragm_in_valid || gacc) begin
        if (gsrc.size() > 0 && $urandom_range(0, 1) == 0) begin fragm_in_valid = 1'b1; fragm_in_data = gsrc.pop_front(); end
        else fragm_in_valid = 1'b0;
      end
      mppa_out_ready  = (n_m_out < 20) ? ($urandom_range(0, 3) == 0) : 1'b1;
      fragm_out_ready = ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    macc <= mppa_in_valid && mppa_in_ready;
    gacc <= fragm_in_valid && fragm_in_ready;
    if (rst_n) begin
      if (mppa_in_valid && !mppa_in_ready) n_m_blocked++;
      if (mppa_out_valid && !mppa_out_ready) n_m_backpressure++;
      if (fragm_in_valid && !fragm_in_ready) n_g_blocked++;
      if (mppa_out_valid && mppa_out_ready) begin
        checks++;
        if (mq.size() == 0 || int'(mppa_out_data) != mq[0]) begin
          failures++; if (failures < 10) $display("MPPA result %0d: %0d", n_m_out, mppa_out_data);
        end
        if (mq.size() != 0) void'(mq.pop_front());
        if (n_m_out > 20) begin
          if (($time - m_last_t) / 10 == 44) n_m_p44++; else n_m_pother++;
        end
        m_last_t = $time;
        n_m_out++;
      end
      if (fragm_out_valid && fragm_out_ready) begin
        checks++;
        if (gq_m.size() == 0 || int'(fragm_out_data) != gq_m[0]) failures++;
        if (gq_m.size() != 0) void'(gq_m.pop_front());
        n_gm_out++;
      end
    end
  end

  // Monitors for the two free-running FPGA-style outputs.
  always @(posedge clk) begin
    if (rst_n && fpga_out_valid) begin
      checks++;
      if (fq.size() == 0 || int'(fpga_out_mag) != fq[0] || fpga_out_border !== fb[0]) begin
        failures++; if (failures < 10) $display("FPGA result %0d want %0d", fpga_out_mag, fq.size() ? fq[0] : -1);
      end
      if (fq.size() != 0) begin
        if (fb[0]) n_border++; else n_interior++;
        void'(fq.pop_front()); void'(fb.pop_front());
      end
    end
    if (rst_n && fragf_out_valid) begin
      checks++;
      if (gq_f.size() == 0 || int'(fragf_out_sum) != gq_f[0]) failures++;
      if (gq_f.size() != 0) void'(gq_f.pop_front());
      n_gf_out++;
    end
  end

  // Row-gradient fragments: the same pixels into both forms.
  initial begin
    int h1 = 0, h2 = 0, p;
    wait (rst_n);
    for (int k = 0; k < 200; k++) begin
      p = $urandom_range(0, 255);
      gsrc.push_back(word_t'(p));
      gq_m.push_back(p + 2*h1 + h2);
      gq_f.push_back(p + 2*h1 + h2);
      h2 = h1; h1 = p;
      @(negedge clk);
      fragf_in_valid = 1'b1; fragf_in_pix = pix_t'(p);
    end
    @(negedge clk);
    fragf_in_valid = 1'b0;
  end

  initial begin
    int t0;
    P = '{default: 0};
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = byte'($urandom_range(0, 255));
    // a bright square so that edges of every direction appear
    for (int r = H/4; r < H/2; r++) for (int c = W/4; c < W/2; c++) img[r][c] = 8'd250;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        msrc.push_back(word_t'(img[r][c]));
        if (r >= 2) column(img[r-2][c], img[r-1][c], img[r][c]);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      t0 = $time;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while (GAPS && f == 1 && $urandom_range(0, 3) == 0) begin
            @(negedge clk); fpga_in_valid = 1'b0;
          end
          @(negedge clk);
          fpga_in_valid = 1'b1; fpga_in_pix = pix_t'(img[r][c]);
          fq.push_back((r < 2 || c < 2) ? 0 : ref_at(r-1, c-1));
          fb.push_back(r < 2 || c < 2);
        end
      @(negedge clk);
      fpga_in_valid = 1'b0;
      if (f == 0) f_frame_clocks = ($time - t0) / 10;
    end
    wait (mq.size() == 0 && gq_m.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (fq.size() != 0 || gq_f.size() != 0) begin failures++; $display("FPGA-side results missing"); end
    checks++;
    if (f_frame_clocks != W*H) begin failures++; $display("FPGA frame took %0d clocks", f_frame_clocks); end
    checks++;
    if (n_m_out != W*(H-2) || n_m_pother != 0 || n_m_p44 == 0) begin
      failures++; $display("MPPA: %0d results, %0d periods of 44, %0d other", n_m_out, n_m_p44, n_m_pother);
    end
    checks++;
    if (fragm_op_count != 32'(3 * 200)) begin failures++; $display("fragment operations %0d", fragm_op_count); end
    // every mechanism must have happened
    checks++; if (n_border == 0)         begin failures++; $display("no border result"); end
    checks++; if (n_interior == 0)       begin failures++; $display("no interior result"); end
    checks++; if (n_m_blocked == 0)      begin failures++; $display("MPPA input never blocked"); end
    checks++; if (n_m_backpressure == 0) begin failures++; $display("MPPA output never held"); end
    checks++; if (n_g_blocked == 0)      begin failures++; $display("fragment input never blocked"); end
    checks++; if (n_gf_out != 200 || n_gm_out != 200) begin failures++; $display("fragment results %0d/%0d", n_gf_out, n_gm_out); end
    $display("FPGA: %0d clocks per %0dx%0d frame (%0d border, %0d interior results)", f_frame_clocks, W, H, n_border, n_interior);
    $display("  at 302 MHz: %0d frames/s", 302000000 / f_frame_clocks);
    $display("MPPA: %0d results, %0d clocks apart; input blocked %0d clocks, output held %0d clocks",
             n_m_out, 44, n_m_blocked, n_m_backpressure);
    $display("  at 300 MHz: %0d frames/s", 300000000 / (44 * W * (H - 2)));
    $display("fragment: %0d results each form, %0d operations, input blocked %0d clocks",
             n_gf_out, fragm_op_count, n_g_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
