// tb_sobel_system_hd: end-to-end test of sobel_system sized for 1920 x 1080
// high-definition frames (IMG_W and IMG_H set accordingly): two frames
// through the FPGA pipeline and one (about 91 million clocks) through the
// MPPA dataflow. See sobel_system_tb_body.svh for what is checked.
module tb_sobel_system_hd;
  import sobel_pkg::*;
  localparam int W = 1920, H = 1080;
  localparam bit GAPS = 1'b0;
  localparam int WATCHDOG = 95_000_000;

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
