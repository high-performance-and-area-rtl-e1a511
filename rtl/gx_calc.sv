// gx_calc: horizontal gradient of a 3x3 window.
//
// The kernel is [-1/4 0 1/4; -1 0 1; -1/4 0 1/4]. To keep every term an
// integer the block returns four times the gradient:
//   gx4 = (d2 + d8 - d0 - d6) + 4*(d5 - d3)
// built from one shift and adders/subtractors; gradient_calc removes the
// factor of four after taking magnitudes. Window order d0..d8 is row-major,
// d0 top-left. Purely combinational.
module gx_calc #(
  parameter int unsigned DW = canny_pkg::DEF_DW
) (
  input  logic [8:0][DW-1:0] win,
  output logic signed [DW+3:0] gx4
);
  always_comb begin
    gx4 = $signed((DW+4)'(win[2])) + $signed((DW+4)'(win[8]))
        - $signed((DW+4)'(win[0])) - $signed((DW+4)'(win[6]))
        + (($signed((DW+4)'(win[5])) - $signed((DW+4)'(win[3]))) <<< 2);
  end
endmodule
