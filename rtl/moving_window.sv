// moving_window: 3x3 neighbourhood generator for a raster pixel stream.
//
// Structure (as drawn for the design): the newest row passes through three
// shift registers and a row FIFO, the middle row through three more and a
// second FIFO, and the oldest row through the last three registers. Each
// FIFO holds IMG_W - 3 pixels, so the three register rows always hold three
// vertically adjacent image rows. The nine registers are the window:
//   win[0..2] = row r-2, columns c-2..c   (oldest, top of the kernel)
//   win[3..5] = row r-1                    (win[4] is the centre pixel)
//   win[6..8] = row r,   columns c-2..c   (win[8] is the newest pixel)
// which is the d0..d8 ordering the kernels are written in.
//
// One pixel enters per cycle in which in_valid is high (no back-pressure).
// The window centre trails the newest pixel by IMG_W + 1 pixels. A tag bit
// per stream position records whether it holds a real pixel; win_valid pulses
// (one cycle after the shift) when a real pixel has reached the centre, with
// ctr_row/ctr_col giving its position and ctr_border set on the outermost
// rows and columns, whose windows reach outside the frame (their neighbours
// are stale or from the wrong row; the consumer decides what to output).
//
// Frame tail: the last IMG_W + 1 pixels of a frame reach the centre only when
// more samples are shifted in. When a whole frame has been received and the
// input is idle, the window shifts in padding samples (tag 0) until every
// real pixel has been emitted; `padding` shows this. Padding is inserted only
// between frames, so it never disturbs the row alignment inside a frame.
// The tag scheme and the padding are this design's choices.
module moving_window #(
  parameter int unsigned IMG_W = canny_pkg::DEF_IMG_W,
  parameter int unsigned IMG_H = canny_pkg::DEF_IMG_H,
  parameter int unsigned DW    = canny_pkg::DEF_DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [DW-1:0]        in_pix,
  output logic                 win_valid,
  output logic [8:0][DW-1:0]   win,
  output logic [15:0]          ctr_row,
  output logic [15:0]          ctr_col,
  output logic                 ctr_border,
  output logic                 padding
);
  localparam int unsigned IFW = $clog2(IMG_W + 3);

  logic [2:0][2:0][DW-1:0] tap;      // tap[row][col], row 0 oldest
  logic [DW-1:0]           fifo_hi_out, fifo_lo_out;
  logic [IMG_W:0]          tag;      // tag[0]: newest, tag[IMG_W+1-1]: one before centre
  logic [15:0]             in_col, in_row, oc_col, oc_row;
  logic [IFW-1:0]          inflight;
  logic                    shift, pad, centre_real;

  assign pad         = !in_valid && (inflight != '0) && (in_col == '0) && (in_row == '0);
  assign shift       = in_valid || pad;
  assign centre_real = tag[IMG_W];
  assign padding     = pad;

  // newest row -> FIFO -> middle row
  line_fifo #(.DEPTH(IMG_W - 3), .WIDTH(DW)) u_fifo_hi (
    .clk, .rst_n, .shift, .din(tap[2][0]), .dout(fifo_hi_out)
  );
  // middle row -> FIFO -> oldest row
  line_fifo #(.DEPTH(IMG_W - 3), .WIDTH(DW)) u_fifo_lo (
    .clk, .rst_n, .shift, .din(tap[1][0]), .dout(fifo_lo_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tap <= '0;
    end else if (shift) begin
      tap[2] <= {in_valid ? in_pix : '0, tap[2][2], tap[2][1]};
      tap[1] <= {fifo_hi_out,            tap[1][2], tap[1][1]};
      tap[0] <= {fifo_lo_out,            tap[0][2], tap[0][1]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag      <= '0;
      in_col   <= '0;
      in_row   <= '0;
      oc_col   <= '0;
      oc_row   <= '0;
      inflight <= '0;
      win_valid  <= 1'b0;
      ctr_row    <= '0;
      ctr_col    <= '0;
      ctr_border <= 1'b0;
    end else begin
      win_valid <= shift && centre_real;
      if (shift) tag <= {tag[IMG_W-1:0], in_valid};
      if (in_valid) begin
        if (in_col == 16'(IMG_W - 1)) begin
          in_col <= '0;
          in_row <= (in_row == 16'(IMG_H - 1)) ? '0 : in_row + 1'b1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      if (shift && centre_real) begin
        ctr_row    <= oc_row;
        ctr_col    <= oc_col;
        ctr_border <= canny_pkg::on_border(oc_row, oc_col, IMG_W, IMG_H);
        if (oc_col == 16'(IMG_W - 1)) begin
          oc_col <= '0;
          oc_row <= (oc_row == 16'(IMG_H - 1)) ? '0 : oc_row + 1'b1;
        end else begin
          oc_col <= oc_col + 1'b1;
        end
      end
      inflight <= inflight + IFW'(in_valid) - IFW'(shift && centre_real);
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        win[3*i + j] = tap[i][j];
  end

  // The window cannot hold more real pixels than the stream positions
  // between the newest pixel and the centre.
  assert property (@(posedge clk) disable iff (!rst_n) inflight <= IFW'(IMG_W + 1));

  initial assert (IMG_W >= 4 && IMG_H >= 3) else $error("moving_window: frame too small");
endmodule
