// tb_frame_delay: a small frame_delay (4x4 frames, 4 pixels of slack).
// Checks that nothing leaves before a frame is released, that a released
// frame leaves in order at one pixel per cycle starting one cycle after the
// release while the next frame is being written, that reading stops at the
// frame end, and that writing past the capacity sets the overflow flag.
module tb_frame_delay;
  localparam int W = 4, H = 4, DW = 8, N = W * H, SLACK = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, release_frame = 0;
  logic [DW-1:0] in_pix = 0;
  logic out_valid, holding, overflow;
  logic [DW-1:0] out_pix;
  int checks = 0, failures = 0, cyc = 0, holds = 0;
  int sent[$], got[$], got_cyc[$];
  int rel_cyc = -1;
  // edge at which the first release is sampled
  always @(posedge clk) if (rst_n && release_frame && rel_cyc < 0) rel_cyc = cyc;

  frame_delay #(.IMG_W(W), .IMG_H(H), .DW(DW), .SLACK(SLACK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && holding) holds++;
  always @(posedge clk) if (rst_n && out_valid) begin
    got.push_back(int'(out_pix));
    got_cyc.push_back(cyc);
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic push(int n, bit rel_first);
    for (int i = 0; i < n; i++) begin
      int v = $urandom_range(0, 255);
      in_valid <= 1;
      in_pix   <= DW'(v);
      release_frame <= rel_first && i == 0;
      sent.push_back(v);
      @(posedge clk);
    end
    in_valid <= 0;
    release_frame <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    push(N, 0);                        // frame 0, not released
    repeat (10) @(posedge clk);
    check(got.size() == 0, "output before release");
    check(holding, "holding flag");
    push(N, 1);                        // release frame 0 while writing frame 1
    repeat (5) @(posedge clk);
    check(got.size() == N, $sformatf("frame 0 size %0d", got.size()));
    for (int i = 0; i < got.size() && i < N; i++) begin
      check(got[i] == sent[i], $sformatf("frame 0 pixel %0d", i));
      // read in the cycle after the release, data registered one cycle later
      check(got_cyc[i] == rel_cyc + 2 + i, $sformatf("frame 0 timing %0d: %0d vs %0d", i, got_cyc[i], rel_cyc + 2 + i));
    end
    repeat (10) @(posedge clk);
    check(got.size() == N, "read past frame end");
    release_frame <= 1;
    @(posedge clk);
    release_frame <= 0;
    repeat (N + 5) @(posedge clk);
    check(got.size() == 2 * N, "frame 1 size");
    for (int i = N; i < got.size() && i < 2 * N; i++)
      check(got[i] == sent[i], $sformatf("frame 1 pixel %0d", i));
    check(!overflow, "early overflow");
    push(N + SLACK, 0);                // fills the buffer exactly
    @(posedge clk);
    check(!overflow, "overflow at capacity");
    push(1, 0);
    @(posedge clk);
    check(overflow, "overflow not flagged");
    check(holds > 0, "holding never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
