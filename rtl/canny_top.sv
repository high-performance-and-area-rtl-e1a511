// canny_top: streaming edge detector with an adaptive, per-frame threshold.
//
// Data flow (one pixel per clock, raster order, no back-pressure):
//   RGB in -> preprocess (gray, resize) -> gaussian_filter (3x3, /16)
//          -> adaptive_threshold: S = sum(A^2)/(8N) over the filtered frame
//          -> frame_delay: holds the filtered frame until its S is known
//          -> moving_window -> gx_calc, gy_calc -> gradient_calc |Gx|+|Gy|
//          -> thresholding: G if G >= S else 0  -> out_edge
// The threshold of a frame is computed from that same frame, which is why
// the gradient path waits one frame in frame_delay; frames may follow each
// other back to back. The per-stage choices are described in each module.
//
// Outputs: out_valid/out_edge carry one value per pixel of the working
// frame, in raster order, IMG_W x IMG_H per frame (DW + 2 bits, 0 = no
// edge); out_pass is high when the pixel passed the threshold. thr/thr_valid
// expose each frame's threshold when it is computed. The remaining outputs
// are status: the two windows inserting frame-tail padding, the delay
// holding a frame, and a sticky delay overflow (input faster than allowed).
//
// Latency: the first edge value of a frame appears IMG_W + 6 cycles after
// that frame's thr_valid, which itself comes one cycle after the frame's last
// filtered pixel; the frame's values then leave at one per clock.
module canny_top #(
  parameter int unsigned DW    = canny_pkg::DEF_DW,
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DECIM = 1,
  parameter int unsigned SLACK = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [3*DW-1:0]   in_rgb,
  output logic              out_valid,
  output logic [DW+1:0]     out_edge,
  output logic              out_pass,
  output logic [2*DW-4:0]   thr,
  output logic              thr_valid,
  output logic              gauss_padding,
  output logic              grad_padding,
  output logic              delay_holding,
  output logic              delay_overflow
);
  localparam int unsigned GRAD_W = DW + 2;
  localparam int unsigned THR_W  = 2 * DW - 3;

  logic                 gray_valid;
  logic [DW-1:0]        gray_pix;
  logic                 gs_valid;
  logic [DW-1:0]        gs_pix;
  logic                 dl_valid;
  logic [DW-1:0]        dl_pix;
  logic                 win_valid, win_border;
  logic [8:0][DW-1:0]   win;
  logic signed [DW+3:0] gx4, gy4;
  logic                 mag_valid;
  logic [GRAD_W-1:0]    mag;

  preprocess #(.DW(DW), .IMG_W(IMG_W), .IMG_H(IMG_H), .DECIM(DECIM)) u_pre (
    .clk, .rst_n, .in_valid, .in_rgb, .out_valid(gray_valid), .out_pix(gray_pix)
  );

  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW)) u_gauss (
    .clk, .rst_n, .in_valid(gray_valid), .in_pix(gray_pix),
    .out_valid(gs_valid), .out_pix(gs_pix), .out_row(), .out_col(),
    .padding(gauss_padding)
  );

  adaptive_threshold #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW), .THR_W(THR_W)) u_athr (
    .clk, .rst_n, .in_valid(gs_valid), .in_pix(gs_pix), .thr, .thr_valid
  );

  frame_delay #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW), .SLACK(SLACK)) u_delay (
    .clk, .rst_n, .in_valid(gs_valid), .in_pix(gs_pix), .release_frame(thr_valid),
    .out_valid(dl_valid), .out_pix(dl_pix), .holding(delay_holding), .overflow(delay_overflow)
  );

  moving_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW)) u_gwin (
    .clk, .rst_n, .in_valid(dl_valid), .in_pix(dl_pix),
    .win_valid, .win, .ctr_row(), .ctr_col(), .ctr_border(win_border),
    .padding(grad_padding)
  );

  gx_calc #(.DW(DW)) u_gx (.win, .gx4);
  gy_calc #(.DW(DW)) u_gy (.win, .gy4);

  gradient_calc #(.DW(DW)) u_grad (
    .clk, .rst_n, .in_valid(win_valid), .in_border(win_border), .gx4, .gy4,
    .out_valid(mag_valid), .out_mag(mag)
  );

  thresholding #(.IMG_W(IMG_W), .IMG_H(IMG_H), .GRAD_W(GRAD_W), .THR_W(THR_W)) u_thr (
    .clk, .rst_n, .thr_valid, .thr, .in_valid(mag_valid), .in_mag(mag),
    .out_valid, .out_edge, .out_pass
  );
endmodule
