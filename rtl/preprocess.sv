// preprocess: turns an RGB raster stream into the gray stream the edge
// detector works on, resized to IMG_W x IMG_H.
//
// Colour to gray uses the usual luma weights 0.299/0.587/0.114 in 8-bit
// fixed point: Y = (77 R + 150 G + 29 B) >> 8 (weights sum to 256, so white
// stays 255). Resizing is nearest-neighbour decimation by an integer factor
// DECIM: of a source frame of (IMG_W*DECIM) x (IMG_H*DECIM) pixels, only
// every DECIM-th pixel of every DECIM-th row is kept. With DECIM = 1 the
// source is already at the working size. The luma weights and the
// decimation are this design's choices; the source frame is expected as a
// raster stream, the serial form the rest of the pipeline consumes.
//
// Timing: one register stage; out_valid follows a kept in_valid by one cycle.
module preprocess #(
  parameter int unsigned DW    = canny_pkg::DEF_DW,
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DECIM = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [3*DW-1:0] in_rgb,     // {R, G, B}
  output logic            out_valid,
  output logic [DW-1:0]   out_pix
);
  localparam int unsigned SRC_W = IMG_W * DECIM;
  localparam int unsigned SRC_H = IMG_H * DECIM;

  logic [DW-1:0]   r, g, b;
  logic [DW+7:0]   y;
  logic [15:0]     scol, srow;
  logic [7:0]      cph, rph;    // position within a DECIM x DECIM cell
  logic            keep;

  assign {r, g, b} = in_rgb;
  assign y    = (DW+8)'(r) * 77 + (DW+8)'(g) * 150 + (DW+8)'(b) * 29;
  assign keep = (cph == '0) && (rph == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scol <= '0; srow <= '0; cph <= '0; rph <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid && keep;
      if (in_valid) begin
        if (keep) out_pix <= y[DW+7:8];
        if (scol == 16'(SRC_W - 1)) begin
          scol <= '0;
          cph  <= '0;
          if (srow == 16'(SRC_H - 1)) begin
            srow <= '0;
            rph  <= '0;
          end else begin
            srow <= srow + 1'b1;
            rph  <= (rph == 8'(DECIM - 1)) ? '0 : rph + 1'b1;
          end
        end else begin
          scol <= scol + 1'b1;
          cph  <= (cph == 8'(DECIM - 1)) ? '0 : cph + 1'b1;
        end
      end
    end
  end

  initial assert (DECIM >= 1 && DECIM <= 256) else $error("preprocess: DECIM out of range");
endmodule
