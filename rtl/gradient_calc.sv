// gradient_calc: gradient magnitude G = |Gx| + |Gy|.
//
// Takes the four-times-scaled gradients from gx_calc and gy_calc, adds their
// absolute values and shifts right by two, so G = (|4Gx| + |4Gy|) >> 2
// (truncated; taking the quarter once at the end is this design's choice).
// With 8-bit pixels G stays below 766 and fits DW + 2 bits. Pixels flagged
// as frame border have no complete neighbourhood and get G = 0 (this
// design's choice).
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
module gradient_calc #(
  parameter int unsigned DW = canny_pkg::DEF_DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_border,
  input  logic signed [DW+3:0] gx4,
  input  logic signed [DW+3:0] gy4,
  output logic                 out_valid,
  output logic [DW+1:0]        out_mag
);
  logic [DW+3:0] ax, ay;
  logic [DW+4:0] s;

  always_comb begin
    ax = gx4[DW+3] ? (DW+4)'(-gx4) : (DW+4)'(gx4);
    ay = gy4[DW+3] ? (DW+4)'(-gy4) : (DW+4)'(gy4);
    s  = (DW+5)'(ax) + (DW+5)'(ay);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_mag <= in_border ? '0 : s[DW+3:2];
    end
  end
endmodule
