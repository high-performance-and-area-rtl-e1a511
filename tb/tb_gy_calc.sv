// tb_gy_calc: checks gx/gy kernel arithmetic of gy_calc against the
// integer reference kernel on random and extreme 3x3 windows.
module tb_gy_calc;
  import canny_ref_pkg::*;
  localparam int DW = 8;
  logic [8:0][DW-1:0] win;
  logic signed [DW+3:0] g4;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic clk = 0;

  gy_calc #(.DW(DW)) dut (.win, .gy4(g4));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    img_t a = new[9];
    int exp;
    for (int i = 0; i < 9; i++) a[i] = int'(win[i]);
    exp = gy4(a, 3, 1, 1);
    #1;
    checks++;
    if (int'(g4) != exp) begin
      failures++;
      if (failures < 10) $display("mismatch win=%h got %0d exp %0d", win, g4, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      @(posedge clk);
      for (int i = 0; i < 9; i++) win[i] = DW'($urandom);
      if (t < 512)
        for (int i = 0; i < 9; i++) win[i] = ((t >> i) & 1) ? 8'hff : 8'h00;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
