// frame_delay: holds each filtered frame until its adaptive threshold is
// known, then releases it to the gradient stage.
//
// The threshold of a frame depends on every pixel of that frame, so the
// gradient path must wait for the whole frame. The delay is a circular
// buffer in a memory array of IMG_W*IMG_H + SLACK pixels. Pixels are written
// as they arrive. Each pulse on `release_frame` allows one more whole frame
// (IMG_W*IMG_H pixels) to be read; reading runs at one pixel per cycle while
// a released frame has pixels left. SLACK covers the pixels of the next frame
// that arrive between the end of a frame and its release. A write into a
// full buffer is dropped and sets the sticky `overflow` flag.
//
// Interface: in_valid/in_pix from the Gaussian filter; out_valid/out_pix in
// raster order, one cycle after each read (synchronous memory read).
// `holding` is high while pixels are stored but none may be read.
module frame_delay #(
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DW    = canny_pkg::DEF_DW,
  parameter int unsigned SLACK = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  input  logic          release_frame,
  output logic          out_valid,
  output logic [DW-1:0] out_pix,
  output logic          holding,
  output logic          overflow
);
  localparam int unsigned N     = IMG_W * IMG_H;
  localparam int unsigned DEPTH = N + SLACK;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PW    = $clog2(N);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic [PW-1:0] rd_pos;
  logic [1:0]    released;
  logic          rd_en, wr_en, rd_last;

  assign rd_en   = (released != '0) && (count != '0);
  assign wr_en   = in_valid && (count != (AW+1)'(DEPTH) || rd_en);
  assign rd_last = rd_en && (rd_pos == PW'(N - 1));
  assign holding = (released == '0) && (count != '0);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= in_pix;
    if (rd_en) out_pix <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      rd_pos    <= '0;
      released  <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= rd_en;
      if (wr_en) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (rd_en) begin
        rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        rd_pos <= rd_last ? '0 : rd_pos + 1'b1;
      end
      count    <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
      released <= released + 2'(release_frame) - 2'(rd_last);
      if (in_valid && !wr_en) overflow <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(release_frame && released == 2'd3));
endmodule
