// adaptive_threshold: one threshold per frame from the filtered image,
//   S = sum_{i=1..N} A_i^2 / (8N),   N = IMG_W * IMG_H,
// where A_i are the Gaussian-filtered pixels of the frame.
//
// Each valid pixel is squared (the block's single multiplier) and added to
// an accumulator wide enough for a whole frame (2*DW + log2(N) bits). N must
// be a power of two so that the division by 8N is a right shift by
// 3 + log2(N); the quotient is truncated. After the last pixel of a frame
// the result is written to `thr`, `thr_valid` pulses for one cycle and the
// accumulator restarts for the next frame.
//
// Interface: in_valid/in_pix in raster order, one pixel per cycle at most,
// frames back to back; the block counts pixels to find frame ends.
// Timing: thr_valid comes one cycle after the frame's last pixel; thr keeps
// its value until the next frame ends (0 after reset).
module adaptive_threshold #(
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DW    = canny_pkg::DEF_DW,
  parameter int unsigned THR_W = 2 * DW - 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DW-1:0]    in_pix,
  output logic [THR_W-1:0] thr,
  output logic             thr_valid
);
  localparam int unsigned N     = IMG_W * IMG_H;
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned ACC_W = 2 * DW + LOGN;
  localparam int unsigned SHIFT = 3 + LOGN;

  logic [2*DW-1:0]  sq;
  logic [ACC_W-1:0] acc, acc_next;
  logic [LOGN-1:0]  pos;

  assign sq       = in_pix * in_pix;
  assign acc_next = acc + ACC_W'(sq);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      pos       <= '0;
      thr       <= '0;
      thr_valid <= 1'b0;
    end else begin
      thr_valid <= 1'b0;
      if (in_valid) begin
        pos <= pos + 1'b1;              // wraps at N, a power of two
        if (pos == LOGN'(N - 1)) begin
          thr       <= THR_W'(acc_next >> SHIFT);
          thr_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

  initial assert (N == (1 << LOGN)) else $error("adaptive_threshold: IMG_W*IMG_H must be a power of two");
endmodule
