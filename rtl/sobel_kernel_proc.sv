// sobel_kernel_proc: the Sobel stage of the two-stage MPPA Sobel dataflow.
//
// Each iteration reads three words from one channel: the top, middle and
// bottom pixel of a new image column. Each word enters the right end of its
// row of a 3x3 neighbourhood, whose older pixels move one place left. The
// stage then writes |Px| + |Py| as one word, Px being the right column minus
// the left column and Py the top row minus the bottom row, each weighted
// 1, 2, 1. The neighbourhood is never cleared, so the results of the first two
// columns of a row mix in the end of the previous row, as a processor running
// the same loop would produce.
//
// The iteration lasts at least KERNEL_CYCLES clocks, counted from its first
// clock, to match the measured cost of the loop on one MPPA processor (44
// clocks per pixel); the write waits for that count. Reads and writes still
// stall on empty and full channels. KERNEL_CYCLES below 4 gives the
// hardware minimum of four clocks (three reads, one write).
//
// Interface: in_*/out_* blocking channels (valid/ready/32-bit data); the
// pixel is the low 8 bits of each input word. The loop body follows the MPPA
// program; the fixed-latency timing model is this design's choice.
module sobel_kernel_proc
  import sobel_pkg::*;
#(
  parameter int unsigned KERNEL_CYCLES = 44
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
  localparam int unsigned KC = (KERNEL_CYCLES > 4) ? KERNEL_CYCLES : 4;
  localparam int unsigned TW = $clog2(KC + 1);

  typedef enum logic [1:0] {S_R_TOP, S_R_MID, S_R_BOT, S_WRITE} state_t;
  state_t        state;
  win_t          p;
  logic [TW-1:0] t;          // clocks since the iteration began
  logic          take, give;

  assign in_ready  = (state != S_WRITE);
  assign take      = in_valid && in_ready;
  assign out_valid = (state == S_WRITE) && (t >= TW'(KC - 1));
  assign give      = out_valid && out_ready;
  assign out_data  = WORD_W'(sobel_mag(p));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_R_TOP;
      t     <= '0;
      p     <= '0;
    end else begin
      if (give)                t <= '0;
      else if (t != TW'(KC))   t <= t + 1'b1;
      unique case (state)
        S_R_TOP: if (take) begin
          p[0] <= {in_data[PIX_W-1:0], p[0][2], p[0][1]};
          state <= S_R_MID;
        end
        S_R_MID: if (take) begin
          p[1] <= {in_data[PIX_W-1:0], p[1][2], p[1][1]};
          state <= S_R_BOT;
        end
        S_R_BOT: if (take) begin
          p[2] <= {in_data[PIX_W-1:0], p[2][2], p[2][1]};
          state <= S_WRITE;
        end
        S_WRITE: if (give) state <= S_R_TOP;
        default: state <= S_R_TOP;
      endcase
    end
  end
endmodule
