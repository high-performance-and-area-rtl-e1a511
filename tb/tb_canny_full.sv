// tb_canny_full: canny_top at its default size (256x256 working frames,
// no resizing): two back-to-back frames, the second with random input
// gaps, every edge value and both thresholds checked against the software
// reference by canny_env.
module tb_canny_full;
  logic clk = 0;
  logic rst_n, in_valid, out_valid, out_pass, thr_valid;
  logic gauss_padding, grad_padding, delay_holding, delay_overflow;
  logic [23:0] in_rgb;
  logic [9:0]  out_edge;
  logic [12:0] thr;

  always #5 clk = ~clk;

  canny_top dut (.*);

  canny_env #(.W(256), .H(256), .DECIM(1), .FR(2), .GAP_FRAME(1), .IDLE_FRAME(-1),
              .WATCHDOG(400000)) env (.*);
endmodule
