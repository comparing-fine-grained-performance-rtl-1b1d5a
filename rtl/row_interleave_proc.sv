// row_interleave_proc: the row-aligning FIFO stage of the two-stage MPPA
// Sobel dataflow.
//
// Each iteration reads one pixel from its input channel (one clock when a
// word is waiting) and pushes it through two row delay lines. Once the
// stream has reached the third image row, it then writes the three pixels of
// the current column, top row first, as three successive words on its single
// output channel (one clock each unless the channel is full). The next stage
// therefore receives the three rows of the image merged into one stream,
// three words per pixel column. The iteration takes four clocks with no
// stalls: one read and three writes, as a processor doing one channel
// operation per clock would.
//
// Interface: in_*/out_* are blocking channels (valid/ready/32-bit data);
// the pixel is the low 8 bits of the input word. Merging the rows into one
// channel follows the MPPA implementation; dropping the first two rows, the
// order of the three words and the one-operation-per-clock timing are this
// design's choice.
module row_interleave_proc
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data
);
  localparam int unsigned RW = $clog2(IMG_H + 1);
  localparam int unsigned CW = $clog2(IMG_W + 1);

  typedef enum logic [1:0] {S_READ, S_W_TOP, S_W_MID, S_W_BOT} state_t;
  state_t state;

  pix_t          x_q, lb1_q, lb2_q;
  logic          take;
  logic [RW-1:0] row;
  logic [CW-1:0] col;

  assign in_ready = (state == S_READ);
  assign take     = in_valid && in_ready;

  line_buffer #(.DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb1 (
    .clk, .rst_n, .en(take), .din(in_data[PIX_W-1:0]), .dout(lb1_q)
  );
  line_buffer #(.DEPTH(IMG_W - 1), .WIDTH(PIX_W)) u_lb2 (
    .clk, .rst_n, .en(take), .din(lb1_q), .dout(lb2_q)
  );

  always_comb begin
    out_valid = 1'b1;
    unique case (state)
      S_W_TOP: out_data = WORD_W'(lb2_q);
      S_W_MID: out_data = WORD_W'(lb1_q);
      S_W_BOT: out_data = WORD_W'(x_q);
      default: begin
        out_valid = 1'b0;
        out_data  = '0;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_READ;
      x_q   <= '0;
      row   <= '0;
      col   <= '0;
    end else begin
      unique case (state)
        S_READ: if (take) begin
          x_q <= in_data[PIX_W-1:0];
          if (row >= 2) state <= S_W_TOP;
          if (col == CW'(IMG_W - 1)) begin
            col <= '0;
            row <= (row == RW'(IMG_H - 1)) ? '0 : row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end
        S_W_TOP: if (out_ready) state <= S_W_MID;
        S_W_MID: if (out_ready) state <= S_W_BOT;
        S_W_BOT: if (out_ready) state <= S_READ;
        default: state <= S_READ;
      endcase
    end
  end
endmodule
