// tb_line_buffer: streams rows of random pixels through a small line buffer
// and checks that each column read returns the previous ROWS lines of that
// column, oldest first, against a software copy of the image.
module tb_line_buffer;
  localparam int W = 9, ROWS = 4, DW = 8, NROWS = 12;

  logic clk = 0, shift_en = 0;
  logic [$clog2(W)-1:0] col = '0;
  logic [DW-1:0] din = '0;
  logic [ROWS-1:0][DW-1:0] dout;
  logic [DW-1:0] img [NROWS][W];
  int checks = 0, failures = 0;

  line_buffer #(.W(W), .ROWS(ROWS), .DW(DW)) dut (.clk, .shift_en, .col, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    foreach (img[y, x]) img[y][x] = DW'($urandom);
    for (int y = 0; y < NROWS; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        col = x[$clog2(W)-1:0];
        din = img[y][x];
        shift_en = ($urandom_range(0, 3) != 0);
        #1;
        if (y >= ROWS) begin
          for (int r = 0; r < ROWS; r++) begin
            checks++;
            if (dout[r] != img[y - ROWS + r][x]) begin
              failures++;
              if (failures < 10) $display("FAIL y=%0d x=%0d r=%0d got %h exp %h", y, x, r, dout[r], img[y-ROWS+r][x]);
            end
          end
        end
        // a pixel that is not shifted in is written on a later pass
        while (!shift_en) begin
          @(negedge clk);
          shift_en = ($urandom_range(0, 2) != 0);
        end
        @(posedge clk);
        #1 shift_en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
