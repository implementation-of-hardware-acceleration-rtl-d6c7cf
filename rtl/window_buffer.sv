// window_buffer: the KxK register window of a streaming 2D convolution.
//
// win[r][c] holds one pixel of DW bits; column K-1 is the newest column and
// row K-1 the newest line, so for a 2R+1 window the centre is win[R][R]. On
// each clock with `shift_en` high every row moves one column to the left
// (the oldest column drops out) and `col_in` (row 0 oldest) enters as the new
// column K-1. Registers are not reset; outputs are valid one clock after the
// shift. This is the window of the line/window buffer scheme used for the
// convolution; the row/column orientation is this design's choice.
module window_buffer #(
  parameter int unsigned K  = 3,
  parameter int unsigned DW = 8
) (
  input  logic                          clk,
  input  logic                          shift_en,
  input  logic [K-1:0][DW-1:0]          col_in,
  output logic [K-1:0][K-1:0][DW-1:0]   win
);

  always_ff @(posedge clk) begin
    if (shift_en) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col_in[r];
      end
    end
  end

endmodule
