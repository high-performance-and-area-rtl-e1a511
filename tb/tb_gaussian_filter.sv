// tb_gaussian_filter: random frames (one with idle gaps) through a small
// gaussian_filter; every output pixel is compared with the reference
// (1/16)[1 2 1;2 4 2;1 2 1] filter, border pixels passed through. Also
// checks raster positions and that each frame's last pixel is flushed.
module tb_gaussian_filter;
  import canny_ref_pkg::*;
  localparam int W = 10, H = 7, DW = 8, N = W * H, FR = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DW-1:0] in_pix = 0;
  logic out_valid, padding;
  logic [DW-1:0] out_pix;
  logic [15:0] out_row, out_col;
  int checks = 0, failures = 0;
  img_t img[FR], ref_o[FR];

  gaussian_filter #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++) begin
      img[f] = new[N];
      foreach (img[f][i]) img[f][i] = (f == 0) ? 255 * ((i / 3) % 2) : $urandom_range(0, 255);
      ref_o[f] = gauss(img[f], W, H);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FR; f++) begin
      for (int i = 0; i < N; i++) begin
        if (f == 1 && $urandom_range(0, 2) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_pix   <= DW'(img[f][i]);
        @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  initial begin
    @(posedge rst_n);
    for (int f = 0; f < FR; f++)
      for (int p = 0; p < N; p++) begin
        do @(posedge clk); while (!out_valid);
        checks++;
        if (int'(out_pix) != ref_o[f][p] || int'(out_row) != p / W || int'(out_col) != p % W) begin
          failures++;
          if (failures < 10)
            $display("f%0d p%0d got %0d @%0d,%0d exp %0d", f, p, out_pix, out_row, out_col, ref_o[f][p]);
        end
      end
    repeat (3 * W) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
