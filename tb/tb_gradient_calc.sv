// tb_gradient_calc: random signed gradients and border flags into
// gradient_calc; expects (|gx4| + |gy4|) / 4, or 0 on the border, one cycle
// later.
module tb_gradient_calc;
  localparam int DW = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_border = 0;
  logic signed [DW+3:0] gx4 = 0, gy4 = 0;
  logic out_valid;
  logic [DW+1:0] out_mag;
  int checks = 0, failures = 0;

  gradient_calc #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    int gx, gy, exp;
    bit bd;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      gx = $urandom_range(0, 3060) - 1530;
      gy = $urandom_range(0, 3060) - 1530;
      if (t == 0) begin gx = -1530; gy = 1530; end
      bd = ($urandom_range(0, 7) == 0);
      @(negedge clk);
      gx4 = 12'(gx); gy4 = 12'(gy); in_border = bd; in_valid = 1;
      exp = bd ? 0 : (iabs(gx) + iabs(gy)) / 4;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(out_mag) != exp) begin
        failures++;
        if (failures < 10) $display("gx=%0d gy=%0d b=%0d got %0d exp %0d", gx, gy, bd, out_mag, exp);
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
