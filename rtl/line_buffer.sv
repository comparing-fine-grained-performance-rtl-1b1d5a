// line_buffer: a delay line of DEPTH samples held in a RAM.
//
// Each enabled cycle reads the sample stored at the circular pointer into the
// output register and writes the new sample in its place, then advances the
// pointer. After enable number k the output holds the sample given at enable
// k-DEPTH (a read-before-write RAM with a registered read port, which maps
// onto one FPGA block RAM). Until DEPTH samples have gone in, the output shows
// the reset contents, which are not cleared: callers ignore those samples.
// The image convolver uses two of these as its row delay lines, as the
// reference FPGA design does with two block RAMs; the registered read and the
// pointer scheme are this design's choice.
//
// Interface: en, din in; dout out. Timing: dout changes only on enabled
// clock edges.
module line_buffer #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

  // RAM: no reset, as a block RAM has none.
  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end
endmodule
