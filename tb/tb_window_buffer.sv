// tb_window_buffer: shifts random columns into a 5x5 window, sometimes holding
// the shift, and compares every register with a software shift model.
module tb_window_buffer;
  localparam int K = 5, DW = 8;

  logic clk = 0, shift_en = 0;
  logic [K-1:0][DW-1:0] col_in = '0;
  logic [K-1:0][K-1:0][DW-1:0] win;
  logic [DW-1:0] model [K][K];
  int checks = 0, failures = 0, filled = 0;

  window_buffer #(.K(K), .DW(DW)) dut (.clk, .shift_en, .col_in, .win);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      for (int r = 0; r < K; r++) col_in[r] = DW'($urandom);
      if (shift_en) begin
        for (int r = 0; r < K; r++) begin
          for (int c = 0; c < K - 1; c++) model[r][c] = model[r][c+1];
          model[r][K-1] = col_in[r];
        end
        filled++;
      end
      @(posedge clk);
      #1;
      if (filled >= K) begin
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            checks++;
            if (win[r][c] != model[r][c]) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d r=%0d c=%0d got %h exp %h", n, r, c, win[r][c], model[r][c]);
            end
          end
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
