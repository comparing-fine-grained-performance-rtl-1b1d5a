// ambric_channel: a word-wide, point-to-point, strictly ordered, blocking
// channel of the kind that joins processors and memories in the MPPA.
//
// It behaves as a synchronous FIFO of DEPTH words (2 in the MPPA). The writer
// offers a word with in_valid and it is taken on a clock where in_ready is
// high; a full channel holds in_ready low, which stalls the writer. The reader
// sees the oldest word with out_valid and takes it with out_ready; an empty
// channel holds out_valid low, which stalls the reader. A word written on one
// clock can be read from the next; with a word in and a word out every clock
// the channel passes one word per clock. A write and a read on the same clock
// are both allowed when the channel is neither full nor empty.
//
// The 32-bit width, the 2-word capacity and the blocking behaviour follow the
// MPPA description; the valid/ready signalling stands for the hardware's
// tagged self-synchronisation, whose wire protocol is not described.
module ambric_channel #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = buf_q[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= in_data;
  end

  // A writer that is stalled keeps offering the same word.
  a_writer_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_data)))
    else $error("ambric_channel: writer dropped or changed a stalled word");
  // The occupancy never exceeds the capacity.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH))
    else $error("ambric_channel: occupancy above capacity");
endmodule
