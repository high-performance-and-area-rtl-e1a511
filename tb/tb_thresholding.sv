// tb_thresholding: frames of random gradient values through thresholding.
// The threshold of the next frame is delivered while the current frame is
// still being output, as in the full pipeline; each output must be the
// gradient if it is >= the threshold of its own frame, else 0, one cycle
// after the input.
module tb_thresholding;
  localparam int W = 4, H = 3, N = W * H, GW = 10, TW = 13, FR = 4;
  logic clk = 0, rst_n = 0;
  logic thr_valid = 0, in_valid = 0;
  logic [TW-1:0] thr = 0;
  logic [GW-1:0] in_mag = 0;
  logic out_valid, out_pass;
  logic [GW-1:0] out_edge;
  int checks = 0, failures = 0, passes = 0, zeros = 0;
  int th[FR] = '{100, 400, 0, 8000};
  int mags[FR][N];

  thresholding #(.IMG_W(W), .IMG_H(H), .GRAD_W(GW), .THR_W(TW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mags[f, i]) mags[f][i] = $urandom_range(0, 765);
    mags[0][3] = 100; mags[0][4] = 99; mags[1][5] = 400; mags[1][6] = 399;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    thr <= TW'(th[0]); thr_valid <= 1;
    @(posedge clk);
    thr_valid <= 0;
    repeat (2) @(posedge clk);
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < N; i++) begin
        in_valid <= 1;
        in_mag   <= GW'(mags[f][i]);
        // the next frame's threshold arrives in the middle of this frame
        thr_valid <= (i == N / 2) && (f + 1 < FR);
        if (f + 1 < FR) thr <= TW'(th[f + 1]);
        @(posedge clk);
        #1;
        begin
          automatic int e = mags[f][i] >= th[f] ? mags[f][i] : 0;
          checks++;
          if (!out_valid || int'(out_edge) != e || out_pass != (mags[f][i] >= th[f])) begin
            failures++;
            $display("f%0d i%0d got %0d exp %0d", f, i, out_edge, e);
          end
          if (mags[f][i] >= th[f]) passes++; else zeros++;
        end
      end
    in_valid <= 0;
    thr_valid <= 0;
    checks++;
    if (passes == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
