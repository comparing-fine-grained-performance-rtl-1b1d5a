// tb_ambric_channel: checks the 2-word blocking channel against a queue
// model: words come out in order and unchanged, the writer is refused exactly
// when two words are held, the reader sees a word exactly when one is held,
// and with both sides always willing one word passes per clock.
module tb_ambric_channel;
  localparam int unsigned WIDTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic [WIDTH-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [WIDTH-1:0] out_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  int n_recv = 0, n_full = 0;
  bit random_phase = 1'b0;
  logic in_ready_q = 1'b0;

  ambric_channel #(.WIDTH(WIDTH), .DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer and reader: change their signals only after a clock edge; a
  // stalled writer keeps its word.
  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready_q) begin
        in_valid = random_phase ? ($urandom_range(0, 2) != 0) : 1'b1;
        in_data  = $urandom;
      end
      out_ready = random_phase ? ($urandom_range(0, 2) != 0) : 1'b1;
    end
  end

  // Model and checks at each edge.
  always @(posedge clk) begin
    in_ready_q <= 1'b0;
    if (rst_n) begin
      checks++;
      if (in_ready !== (model.size() < 2) || out_valid !== (model.size() > 0)) begin
        failures++; $display("flags wrong: held %0d ready %0b valid %0b", model.size(), in_ready, out_valid);
      end
      if (model.size() == 2) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (model.size() == 0 || out_data !== model[0]) begin failures++; $display("wrong word"); end
        if (model.size() != 0) void'(model.pop_front());
        n_recv++;
      end
      if (in_valid && in_ready) model.push_back(in_data);
      in_ready_q <= in_valid && in_ready;
    end
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    n0 = n_recv;
    repeat (100) @(posedge clk);
    checks++;
    if (n_recv - n0 != 100) begin failures++; $display("streaming rate %0d words / 100 clocks", n_recv - n0); end
    random_phase = 1'b1;
    repeat (3000) @(posedge clk);
    checks++;
    if (n_full == 0) begin failures++; $display("channel never filled"); end
    $display("words %0d, clocks full %0d", n_recv, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
