// canny_pkg: sizes shared by the edge-detection pipeline.
//
// The pipeline works on 8-bit gray frames of 256 x 256 pixels streamed in
// raster order, one pixel per clock. The frame size is the one the design
// is specified for; the pixel width is this design's choice (8-bit gray).
// Derived widths:
//   DEF_GRAD_W : |Gx| + |Gy| with the quarter-weighted kernels peaks at
//            6 * 255 / 4 * 2 = 765, so it needs DW + 2 bits.
//   DEF_THR_W : sum(A^2) / (8N) peaks at 255^2 / 8 = 8128, so 2*DW - 3 bits.
package canny_pkg;
  localparam int unsigned DEF_DW     = 8;
  localparam int unsigned DEF_IMG_W  = 256;
  localparam int unsigned DEF_IMG_H  = 256;
  localparam int unsigned DEF_GRAD_W = DEF_DW + 2;
  localparam int unsigned DEF_THR_W  = 2 * DEF_DW - 3;

  // Pixel position in the raster and whether it lies on the frame border.
  function automatic logic on_border(input logic [15:0] row, input logic [15:0] col,
                                     input int unsigned w, input int unsigned h);
    return (row == '0) || (col == '0) || (row == 16'(h - 1)) || (col == 16'(w - 1));
  endfunction
endpackage
