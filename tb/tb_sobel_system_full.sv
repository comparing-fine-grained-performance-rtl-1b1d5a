// tb_sobel_system_full: end-to-end test of sobel_system at its default size,
// one 512 x 512 frame through the MPPA dataflow (about 11.5 million clocks)
// and two through the FPGA pipeline. See sobel_system_tb_body.svh for what
// is checked.
module tb_sobel_system_full;
  import sobel_pkg::*;
  localparam int W = 512, H = 512;
  localparam bit GAPS = 1'b0;
  localparam int WATCHDOG = 12_000_000;

  sobel_system dut (.*);

`include "sobel_system_tb_body.svh"

  // Watchdog: a run that has not finished by now counts as failed.
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
