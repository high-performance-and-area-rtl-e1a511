// thresholding: final edge decision (the comparison is >=, as in the
// specifying equation; a prose description elsewhere says "larger than"),
//   out = G  if G >= S,   out = 0 otherwise,
// where G is the gradient magnitude of a pixel and S the adaptive threshold
// of the frame the pixel belongs to.
//
// Thresholds arrive (thr/thr_valid) once per frame, before that frame's
// gradients, and possibly while the previous frame is still being output.
// A new threshold is therefore parked in `thr_next` and becomes the current
// one at the first pixel of the next frame; pixels are counted to find frame
// starts. This two-register hand-over is this design's choice.
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
module thresholding #(
  parameter int unsigned IMG_W  = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H  = canny_pkg::DEF_IMG_H,
  parameter int unsigned GRAD_W = canny_pkg::DEF_GRAD_W,
  parameter int unsigned THR_W  = canny_pkg::DEF_THR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              thr_valid,
  input  logic [THR_W-1:0]  thr,
  input  logic              in_valid,
  input  logic [GRAD_W-1:0] in_mag,
  output logic              out_valid,
  output logic [GRAD_W-1:0] out_edge,
  output logic              out_pass
);
  localparam int unsigned N  = IMG_W * IMG_H;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned CW = (GRAD_W > THR_W) ? GRAD_W : THR_W;

  logic [THR_W-1:0] thr_next, thr_cur, thr_use;
  logic             next_full;
  logic [PW-1:0]    pos;
  logic             first, pass;

  assign first   = (pos == '0);
  assign thr_use = first ? thr_next : thr_cur;
  assign pass    = CW'(in_mag) >= CW'(thr_use);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      thr_next  <= '0;
      thr_cur   <= '0;
      next_full <= 1'b0;
      pos       <= '0;
      out_valid <= 1'b0;
      out_edge  <= '0;
      out_pass  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pos      <= (pos == PW'(N - 1)) ? '0 : pos + 1'b1;
        out_edge <= pass ? in_mag : '0;
        out_pass <= pass;
        if (first) thr_cur <= thr_next;
      end
      if (thr_valid) begin
        thr_next  <= thr;
        next_full <= 1'b1;
      end else if (in_valid && first) begin
        next_full <= 1'b0;
      end
    end
  end

  // A frame must not start before its threshold has arrived.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && first) |-> next_full)
    else $error("thresholding: frame started without a threshold");
endmodule
