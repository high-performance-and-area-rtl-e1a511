// line_fifo: fixed-length delay line used as the row FIFO of the 3x3
// moving window.
//
// Every cycle in which `shift` is high the FIFO takes `din` and presents on
// `dout` the word it took DEPTH shifts earlier, so its length in shifts is
// exactly DEPTH. It is a circular buffer in a memory array: one read of the
// oldest word (asynchronous) and one write per shift at the same address.
// The contents are not reset; the window that uses it tags every word so
// that stale contents are never used.
module line_fifo #(
  parameter int unsigned DEPTH = 253,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                               ptr <= '0;
    else if (shift && ptr == AW'(DEPTH - 1))  ptr <= '0;
    else if (shift)                           ptr <= ptr + 1'b1;
  end
endmodule
