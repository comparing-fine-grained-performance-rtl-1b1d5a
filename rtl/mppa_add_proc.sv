// mppa_add_proc: an adder processor of the MPPA row-gradient fragment.
//
// It models a processor running the four-instruction loop "read a, read b,
// add, write", one operation per clock: read a word from channel a, then one
// from channel b, add them, and write the sum to the output channel. Each
// step stalls while its channel is empty (reads) or full (the write). With no
// stalls a result leaves every four clocks, and the add occupies one clock in
// four; busy_op is high on that clock.
//
// Interface: a_*, b_*, out_* are blocking channels (valid/ready/32-bit data).
// Timing and operation sequence follow the MPPA fragment; the sum wraps at
// 32 bits.
module mppa_add_proc
  import sobel_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  a_valid,
  output logic  a_ready,
  input  word_t a_data,
  input  logic  b_valid,
  output logic  b_ready,
  input  word_t b_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  output logic  busy_op
);
  typedef enum logic [1:0] {S_RD_A, S_RD_B, S_ADD, S_WR} state_t;
  state_t state;
  word_t  a_q, b_q;

  assign a_ready   = (state == S_RD_A);
  assign b_ready   = (state == S_RD_B);
  assign out_valid = (state == S_WR);
  assign busy_op   = (state == S_ADD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_RD_A;
      a_q      <= '0;
      b_q      <= '0;
      out_data <= '0;
    end else begin
      unique case (state)
        S_RD_A: if (a_valid) begin a_q <= a_data; state <= S_RD_B; end
        S_RD_B: if (b_valid) begin b_q <= b_data; state <= S_ADD;  end
        S_ADD:  begin out_data <= a_q + b_q; state <= S_WR; end
        S_WR:   if (out_ready) state <= S_RD_A;
        default: state <= S_RD_A;
      endcase
    end
  end
endmodule
