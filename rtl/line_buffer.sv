// line_buffer: the row store of a streaming 2D convolution.
//
// Holds the ROWS (= K-1) image lines that precede the line being scanned, W
// columns wide, DW bits per pixel. For column `col` the read port returns the
// whole stored column, row 0 being the oldest line and row ROWS-1 the line just
// above the current pixel; with the window buffer's new pixel this is one full
// window column. When `shift_en` is high the column moves up by one line on the
// clock edge: every row takes the row below it and the last row takes `din`.
// Read is combinational (same cycle as `col`), write takes one clock. The
// contents are not reset: a convolution only reads lines that it has written
// before it uses them. Keeping K-1 whole lines is the classic line-buffer
// arrangement; the combinational read port is this design's choice.
module line_buffer #(
  parameter int unsigned W    = 640,
  parameter int unsigned ROWS = 2,
  parameter int unsigned DW   = 8
) (
  input  logic                   clk,
  input  logic                   shift_en,
  input  logic [$clog2(W)-1:0]   col,
  input  logic [DW-1:0]          din,
  output logic [ROWS-1:0][DW-1:0] dout
);

  logic [DW-1:0] mem [ROWS][W];

  always_comb begin
    for (int r = 0; r < ROWS; r++) dout[r] = mem[r][col];
  end

  always_ff @(posedge clk) begin
    if (shift_en) begin
      for (int r = 0; r < ROWS - 1; r++) mem[r][col] <= mem[r+1][col];
      mem[ROWS-1][col] <= din;
    end
  end

endmodule
