// gaussian_filter: 3x3 Gaussian smoothing of a raster gray stream.
//
// The kernel is (1/16) * [1 2 1; 2 4 2; 1 2 1], applied to the window from
// moving_window. Every weight is a power of two, so the sum is formed with
// shifts and adds only and the division by 16 is a right shift (the result
// is truncated). The weights add up to 16, so the output never exceeds the
// input range. Pixels on the outermost rows and columns have no full
// neighbourhood; they are passed through unfiltered (this design's choice).
//
// Interface: one pixel per cycle in (in_valid/in_pix), no back-pressure.
// Output: out_valid/out_pix in raster order, one per input pixel, with
// out_row/out_col giving the position. Latency: the output for a pixel comes
// two cycles after the window centre reaches it, i.e. IMG_W + 1 input pixels
// plus two cycles after the pixel itself entered; the frame tail is flushed
// by the window's padding.
module gaussian_filter #(
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DW    = canny_pkg::DEF_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  output logic          out_valid,
  output logic [DW-1:0] out_pix,
  output logic [15:0]   out_row,
  output logic [15:0]   out_col,
  output logic          padding
);
  logic                 win_valid, border;
  logic [8:0][DW-1:0]   win;
  logic [15:0]          row, col;
  logic [DW+3:0]        sum;

  moving_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .DW(DW)) u_win (
    .clk, .rst_n, .in_valid, .in_pix,
    .win_valid, .win, .ctr_row(row), .ctr_col(col), .ctr_border(border), .padding
  );

  // corners weight 1, edges weight 2 (<<1), centre weight 4 (<<2)
  always_comb begin
    sum = (DW+4)'(win[0]) + (DW+4)'(win[2]) + (DW+4)'(win[6]) + (DW+4)'(win[8])
        + (((DW+4)'(win[1]) + (DW+4)'(win[3]) + (DW+4)'(win[5]) + (DW+4)'(win[7])) << 1)
        + ((DW+4)'(win[4]) << 2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_row   <= '0;
      out_col   <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        out_pix <= border ? win[4] : sum[DW+3:4];
        out_row <= row;
        out_col <= col;
      end
    end
  end
endmodule
