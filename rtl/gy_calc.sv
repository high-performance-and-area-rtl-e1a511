// gy_calc: vertical gradient of a 3x3 window.
//
// The kernel is [1/4 1 1/4; 0 0 0; -1/4 -1 -1/4]. As in gx_calc the block
// returns four times the gradient so that every term is an integer:
//   gy4 = (d0 + d2 - d6 - d8) + 4*(d1 - d7)
// Window order d0..d8 is row-major, d0 top-left. Purely combinational.
module gy_calc #(
  parameter int unsigned DW = canny_pkg::DEF_DW
) (
  input  logic [8:0][DW-1:0] win,
  output logic signed [DW+3:0] gy4
);
  always_comb begin
    gy4 = $signed((DW+4)'(win[0])) + $signed((DW+4)'(win[2]))
        - $signed((DW+4)'(win[6])) - $signed((DW+4)'(win[8]))
        + (($signed((DW+4)'(win[1])) - $signed((DW+4)'(win[7]))) <<< 2);
  end
endmodule
