// tb_preprocess: random RGB source frames of 8x6 pixels, decimated by two to
// 4x3; checks each gray output against (77R + 150G + 29B)/256 of the kept
// source pixel (even rows, even columns) and the count of outputs.
module tb_preprocess;
  import canny_ref_pkg::*;
  localparam int DW = 8, W = 4, H = 3, D = 2, SW = W * D, SH = H * D, FR = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3*DW-1:0] in_rgb = 0;
  logic out_valid;
  logic [DW-1:0] out_pix;
  int checks = 0, failures = 0;
  int expq[$];

  preprocess #(.DW(DW), .IMG_W(W), .IMG_H(H), .DECIM(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      automatic int e = expq.pop_front();
      if (int'(out_pix) != e) begin
        failures++;
        $display("got %0d exp %0d", out_pix, e);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < SH; r++)
        for (int c = 0; c < SW; c++) begin
          automatic int rr = $urandom_range(0, 255), gg = $urandom_range(0, 255), bb = $urandom_range(0, 255);
          if (f == 0 && r == 0 && c == 0) begin rr = 255; gg = 255; bb = 255; end
          if ($urandom_range(0, 3) == 0) begin
            in_valid <= 0;
            @(posedge clk);
          end
          in_valid <= 1;
          in_rgb   <= {DW'(rr), DW'(gg), DW'(bb)};
          if (r % D == 0 && c % D == 0) expq.push_back(gray(rr, gg, bb));
          @(posedge clk);
        end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
