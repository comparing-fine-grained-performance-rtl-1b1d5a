// mppa_stage_proc: a staging processor of the MPPA row-gradient fragment,
// one of the "x1" / "x2" processors that shift pixels along a row.
//
// It models a processor that does one operation per clock and stalls on its
// channels. Each iteration: read one word (R); if PASS, write a word to the
// next stage (W); if DOUBLE, double the weighted value (one arithmetic
// operation); write the weighted value to the adder (W). Without CAPTIVE the
// word just read is both forwarded and weighted. With CAPTIVE the processor
// holds the word of the previous iteration (its captive pixel, zero after
// reset): it forwards and weights that word and keeps the new one. The three
// staging processors of the fragment are therefore
//   first  x1: PASS=1 CAPTIVE=0 DOUBLE=0  (R, W, W)
//   middle x2: PASS=1 CAPTIVE=1 DOUBLE=1  (R, W, x2, W)
//   last   x1: PASS=0 CAPTIVE=1 DOUBLE=0  (R, W)
// busy_op is high on the clock of the arithmetic operation.
//
// Interface: in_*, fwd_*, add_* are blocking channels (valid/ready/32-bit).
// The read/write/operate sequences follow the fragment's description; the
// captive-pixel scheme that aligns the three pixels is this design's reading.
module mppa_stage_proc
  import sobel_pkg::*;
#(
  parameter bit PASS    = 1'b1,
  parameter bit CAPTIVE = 1'b0,
  parameter bit DOUBLE  = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  fwd_valid,
  input  logic  fwd_ready,
  output word_t fwd_data,
  output logic  add_valid,
  input  logic  add_ready,
  output word_t add_data,
  output logic  busy_op
);
  typedef enum logic [1:0] {S_READ, S_FWD, S_OP, S_ADD} state_t;
  state_t state;
  word_t  x_q, cap_q, val;

  // The word this iteration works on.
  assign val = CAPTIVE ? cap_q : x_q;

  assign in_ready  = (state == S_READ);
  assign fwd_valid = PASS && (state == S_FWD);
  assign fwd_data  = val;
  assign add_valid = (state == S_ADD);
  assign busy_op   = (state == S_OP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_READ;
      x_q      <= '0;
      cap_q    <= '0;
      add_data <= '0;
    end else begin
      unique case (state)
        S_READ: if (in_valid) begin
          x_q      <= in_data;
          add_data <= CAPTIVE ? cap_q : in_data;
          state    <= PASS ? S_FWD : (DOUBLE ? S_OP : S_ADD);
        end
        S_FWD: if (fwd_ready) state <= DOUBLE ? S_OP : S_ADD;
        S_OP: begin
          add_data <= {val[WORD_W-2:0], 1'b0};
          state    <= S_ADD;
        end
        S_ADD: if (add_ready) begin
          cap_q <= x_q;
          state <= S_READ;
        end
        default: state <= S_READ;
      endcase
    end
  end
endmodule
