// tb_sobel_system: end-to-end test of sobel_system on a 16 x 9 image, with
// random input gaps on the FPGA pipeline's second frame. See
// sobel_system_tb_body.svh for what is checked.
module tb_sobel_system;
  import sobel_pkg::*;
  localparam int W = 16, H = 9;
  localparam bit GAPS = 1'b1;
  localparam int WATCHDOG = 50000;

  sobel_system #(.IMG_W(W), .IMG_H(H)) dut (.*);

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
