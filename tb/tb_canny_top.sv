// tb_canny_top: end-to-end test of canny_top on 16x16 working frames
// resized from 32x32 RGB sources (DECIM = 2): four frames, one with random
// input gaps and one after a long idle period, checked pixel by pixel
// against the software reference by canny_env.
module tb_canny_top;
  localparam int W = 16, H = 16, DECIM = 2;
  logic clk = 0;
  logic rst_n, in_valid, out_valid, out_pass, thr_valid;
  logic gauss_padding, grad_padding, delay_holding, delay_overflow;
  logic [23:0] in_rgb;
  logic [9:0]  out_edge;
  logic [12:0] thr;

  always #5 clk = ~clk;

  canny_top #(.IMG_W(W), .IMG_H(H), .DECIM(DECIM)) dut (.*);

  canny_env #(.W(W), .H(H), .DECIM(DECIM), .FR(4), .GAP_FRAME(1), .IDLE_FRAME(3),
              .WATCHDOG(60000)) env (.*);
endmodule
