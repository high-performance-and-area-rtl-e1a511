// tb_moving_window: streams random frames, with random idle cycles, into a
// small moving_window and checks every emitted window: its centre position
// (raster order, every pixel exactly once per frame), the border flag, and
// for interior pixels all nine neighbours. With a continuous input the
// centre must appear IMG_W + 1 pixels plus one cycle after the pixel itself
// entered. Also counts the frame-tail padding.
module tb_moving_window;
  localparam int W = 8, H = 6, DW = 8, N = W * H, FR = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DW-1:0] in_pix = 0;
  logic win_valid, ctr_border, padding;
  logic [8:0][DW-1:0] win;
  logic [15:0] ctr_row, ctr_col;
  int checks = 0, failures = 0, cyc = 0, pads = 0, outs = 0;
  int img[FR][N];
  int in_cyc[FR][N];
  bit gaps;

  moving_window #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: outs=%0d", outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  // driver: frames 0,1 back to back; frame 2 with random gaps; frame 3
  // after a long idle period
  initial begin
    for (int f = 0; f < FR; f++)
      for (int i = 0; i < N; i++) img[f][i] = $urandom_range(0, 255);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FR; f++) begin
      if (f == 3) repeat (3 * W) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        while (f == 2 && $urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_pix   <= DW'(img[f][i]);
        @(posedge clk);
        in_cyc[f][i] = cyc;
      end
      if (f >= 1) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  always @(posedge clk) if (padding) pads++;

  // monitor
  initial begin
    int f, p, r, c;
    @(posedge rst_n);
    for (f = 0; f < FR; f++)
      for (p = 0; p < N; p++) begin
        do @(posedge clk); while (!win_valid);
        outs++;
        r = p / W; c = p % W;
        checks++;
        if (int'(ctr_row) != r || int'(ctr_col) != c)
          fail($sformatf("f%0d p%0d pos %0d,%0d", f, p, ctr_row, ctr_col));
        checks++;
        if (ctr_border != (r == 0 || c == 0 || r == H - 1 || c == W - 1))
          fail($sformatf("f%0d p%0d border", f, p));
        if (!(r == 0 || c == 0 || r == H - 1 || c == W - 1))
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              checks++;
              if (int'(win[3 * i + j]) != img[f][(r - 1 + i) * W + c - 1 + j])
                fail($sformatf("f%0d p%0d tap %0d", f, p, 3 * i + j));
            end
        // latency with continuous input: frames 0 and 1 except the tail
        if (f < 2 && p + W + 1 < N) begin
          checks++;
          if (cyc != in_cyc[f][p + W + 1] + 1)
            fail($sformatf("f%0d p%0d latency %0d vs %0d", f, p, cyc, in_cyc[f][p + W + 1]));
        end
      end
    repeat (4 * W) @(posedge clk);
    checks++;
    if (pads == 0) fail("no padding seen");
    checks++;
    if (win_valid) fail("extra output");
    $display("outputs=%0d padding cycles=%0d", outs, pads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
