// tb_adaptive_threshold: frames of random, all-zero and all-255 pixels into
// adaptive_threshold with idle gaps; each thr_valid must come one cycle
// after the frame's last pixel and carry sum(A^2)/(8N).
module tb_adaptive_threshold;
  import canny_ref_pkg::*;
  localparam int W = 8, H = 4, DW = 8, N = W * H, FR = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DW-1:0] in_pix = 0;
  logic [2*DW-4:0] thr;
  logic thr_valid;
  int checks = 0, failures = 0, cyc = 0, last_cyc[FR];
  img_t img[FR];

  adaptive_threshold #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FR; f++) begin
      img[f] = new[N];
      foreach (img[f][i])
        img[f][i] = (f == 1) ? 255 : (f == 2) ? 0 : (f == 3) ? $urandom_range(0, 40) : $urandom_range(0, 255);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 4) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_pix   <= DW'(img[f][i]);
        @(posedge clk);
        if (i == N - 1) last_cyc[f] = cyc;
      end
    in_valid <= 0;
  end

  initial begin
    @(posedge rst_n);
    for (int f = 0; f < FR; f++) begin
      do @(posedge clk); while (!thr_valid);
      checks++;
      if (int'(thr) != thresh(img[f], N)) begin
        failures++;
        $display("frame %0d thr %0d exp %0d", f, thr, thresh(img[f], N));
      end
      checks++;
      if (cyc != last_cyc[f] + 1) begin
        failures++;
        $display("frame %0d thr at %0d, last pixel %0d", f, cyc, last_cyc[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
