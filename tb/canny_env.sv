// canny_env: stimulus and scoreboard for the whole edge detector.
//
// Drives FR source frames of (W*DECIM) x (H*DECIM) RGB pixels into the
// detector's input and checks everything that comes out against the
// software reference in canny_ref_pkg: each frame's threshold and every
// thresholded gradient value, in order. Frame GAP_FRAME is sent with random
// idle cycles, and a long idle period precedes frame IDLE_FRAME; the other
// frames follow back to back. It also checks that each frame's edge values
// leave at one per clock without a break, starting IMG_W + 6 cycles after
// the frame's threshold, and counts how often each
// mechanism of the design was exercised (Gaussian and gradient window
// padding, frames held in the delay, threshold pass, threshold suppression,
// border pixels, input gaps, resizing); one that never happened counts as
// a failure. Ends the simulation with the TB_RESULT line.
module canny_env #(
  parameter int W = 16,
  parameter int H = 16,
  parameter int DECIM = 1,
  parameter int FR = 3,
  parameter int GAP_FRAME = 1,
  parameter int IDLE_FRAME = 2,
  parameter int WATCHDOG = 100000
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            in_valid,
  output logic [23:0]     in_rgb,
  input  logic            out_valid,
  input  logic [9:0]      out_edge,
  input  logic            out_pass,
  input  logic [12:0]     thr,
  input  logic            thr_valid,
  input  logic            gauss_padding,
  input  logic            grad_padding,
  input  logic            delay_holding,
  input  logic            delay_overflow
);
  import canny_ref_pkg::*;
  localparam int N = W * H;
  localparam int SW = W * DECIM, SH = H * DECIM;

  int checks = 0, failures = 0, cyc = 0;
  int n_gpad = 0, n_dpad = 0, n_hold = 0, n_pass = 0, n_supp = 0, n_border = 0;
  int n_gap = 0, n_drop = 0;
  int exp_thr[FR];
  int exp_edge[$], exp_mag[$];
  int thr_seen = 0, out_seen = 0;
  int first_out[FR], last_out[FR], thr_cyc[FR];

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  task automatic finish();
    $display("counts: gauss_pad=%0d grad_pad=%0d held=%0d pass=%0d suppressed=%0d border=%0d gaps=%0d dropped_by_resize=%0d",
             n_gpad, n_dpad, n_hold, n_pass, n_supp, n_border, n_gap, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    fail("watchdog");
    finish();
  end

  // reference model and driver
  initial begin
    img_t src[FR];
    rst_n = 0;
    in_valid = 0;
    in_rgb = '0;
    for (int f = 0; f < FR; f++) begin
      img_t gr, gs, gm;
      src[f] = scene(SW, SH, f + 1);
      gr = new[N];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          automatic int p = src[f][(r * DECIM) * SW + c * DECIM];
          gr[r * W + c] = gray((p >> 16) & 255, (p >> 8) & 255, p & 255);
        end
      gs = gauss(gr, W, H);
      exp_thr[f] = thresh(gs, N);
      gm = grad(gs, W, H);
      for (int i = 0; i < N; i++) begin
        exp_mag.push_back(gm[i]);
        exp_edge.push_back(gm[i] >= exp_thr[f] ? gm[i] : 0);
      end
      $display("frame %0d: threshold %0d", f, exp_thr[f]);
    end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FR; f++) begin
      if (f == IDLE_FRAME) begin
        in_valid <= 0;
        repeat (2 * N) @(posedge clk);
      end
      for (int i = 0; i < SW * SH; i++) begin
        if (f == GAP_FRAME && $urandom_range(0, 4) == 0) begin
          in_valid <= 0;
          n_gap++;
          @(posedge clk);
        end
        in_valid <= 1;
        in_rgb   <= 24'(src[f][i]);
        if (DECIM > 1 && ((i / SW) % DECIM != 0 || (i % SW) % DECIM != 0)) n_drop++;
        @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (gauss_padding) n_gpad++;
    if (grad_padding)  n_dpad++;
    if (delay_holding) n_hold++;
    if (thr_valid) begin
      checks++;
      if (thr_seen >= FR) fail("extra threshold");
      else if (int'(thr) != exp_thr[thr_seen])
        fail($sformatf("frame %0d threshold %0d, expected %0d", thr_seen, thr, exp_thr[thr_seen]));
      if (thr_seen < FR) thr_cyc[thr_seen] = cyc;
      thr_seen++;
    end
    if (out_valid) begin
      automatic int f = out_seen / N, p = out_seen % N;
      checks++;
      if (out_seen >= FR * N) fail("extra output");
      else begin
        if (int'(out_edge) != exp_edge[out_seen] || out_pass != (exp_mag[out_seen] >= exp_thr[f]))
          fail($sformatf("frame %0d pixel (%0d,%0d): %0d, expected %0d", f, p / W, p % W,
                         out_edge, exp_edge[out_seen]));
        if (out_pass) n_pass++;
        else if (exp_mag[out_seen] > 0) n_supp++;
        if (p / W == 0 || p % W == 0 || p / W == H - 1 || p % W == W - 1) n_border++;
        if (p == 0) first_out[f] = cyc;
        if (p == N - 1) last_out[f] = cyc;
      end
      out_seen++;
      if (out_seen == FR * N) begin
        // one edge value per clock within every frame
        for (int k = 0; k < FR; k++) begin
          checks++;
          if (last_out[k] - first_out[k] != N - 1)
            fail($sformatf("frame %0d took %0d cycles for %0d pixels", k, last_out[k] - first_out[k] + 1, N));
          // release, read, window fill of W+1 pixels, window, gradient and
          // threshold registers: first value W + 6 cycles after thr_valid
          checks++;
          if (first_out[k] - thr_cyc[k] != W + 6)
            fail($sformatf("frame %0d first value %0d cycles after its threshold", k, first_out[k] - thr_cyc[k]));
        end
        checks++;
        if (thr_seen != FR) fail("thresholds missing");
        checks++;
        if (delay_overflow) fail("delay overflow");
        checks++;
        if (n_gpad == 0 || n_dpad == 0 || n_hold == 0 || n_pass == 0 || n_supp == 0 || n_border == 0)
          fail("a mechanism was never exercised");
        checks++;
        if (GAP_FRAME >= 0 && GAP_FRAME < FR && n_gap == 0) fail("no input gaps");
        checks++;
        if (DECIM > 1 && n_drop == 0) fail("resizing never dropped a pixel");
        finish();
      end
    end
  end
endmodule
