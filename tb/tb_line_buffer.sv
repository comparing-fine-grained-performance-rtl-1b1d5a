// tb_line_buffer: checks that line_buffer returns each sample exactly DEPTH
// enables after it went in, with random gaps between enables, and that the
// output does not move on cycles without an enable.
module tb_line_buffer;
  localparam int unsigned DEPTH = 7;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];
  logic [WIDTH-1:0] prev;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = WIDTH'($urandom);
      prev = dout;
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(din);
        if (hist.size() > DEPTH) begin
          checks++;
          if (dout !== hist[hist.size()-1-DEPTH]) begin
            failures++;
            if (failures < 10) $display("mismatch at %0d: got %0h want %0h", i, dout, hist[hist.size()-1-DEPTH]);
          end
        end
      end else begin
        checks++;
        if (dout !== prev) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
