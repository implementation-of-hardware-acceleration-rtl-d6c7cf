// tb_conv_layer: runs the 5x5, 6-in/3-out layer of the network (the one fed by
// the concatenation of c1 and c2) on a small image. The layer's weights,
// biases and quantization constants are written through the configuration
// port; two frames of random 9-channel pixels are streamed in. Frame 0 has
// random input gaps and output back-pressure, frame 1 has neither. Every output
// pixel is compared with the reference feature map (carried channels and the
// three new channels, boundary pass-through included), and the period of the
// stall-free frame is checked against the schedule: one clock per scan
// position, plus one per boundary pixel and 3*K+1 per interior pixel.
module tb_conv_layer;
  import aod_pkg::*;
  import aod_ref_pkg::*;
  localparam int W = 12, H = 9, L = 3;
  localparam int K = 5, R = 2, CW = 9, WLO = 3, CIN = 6, COUT = 3;
  localparam int NW = COUT * K * K * CIN;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [CW-1:0][7:0] in_data = '0;
  logic [CW+COUT-1:0][7:0] out_data;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  int checks = 0, failures = 0;
  byte unsigned frames [2][CW+COUT][H][W];
  longint t_last [2];

  conv_layer #(.W(W), .H(H), .K(K), .CW(CW), .WLO(WLO), .CIN(CIN), .COUT(COUT)) dut (.*);

  always #5 clk = ~clk;

  task automatic cfg(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = CFG_AW'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic send(int f, bit gaps);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int c = 0; c < CW; c++) in_data[c] = frames[f][c][y][x];
        #1 while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
  endtask

  task automatic recv(int f, bit gaps);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1 while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
          #1;
        end
        if (y == H - 1 && x == W - 1) t_last[f] = longint'($time);
        for (int c = 0; c < CW + COUT; c++) begin
          checks++;
          if (out_data[c] != frames[f][c][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d (%0d,%0d) ch%0d got %0d exp %0d", f, y, x, c, out_data[c], frames[f][c][y][x]);
          end
        end
      end
  endtask

  initial begin
    longint period, expect_period;
    make_params(7);
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NW; i++) cfg(i, wq[L][i]);
    for (int o = 0; o < COUT; o++) cfg(REG_BIAS + o, bq[L][o]);
    cfg(REG_ZX, zx[L]); cfg(REG_ZW, zw[L]); cfg(REG_ZY, zy[L]); cfg(REG_M, mq[L]); cfg(REG_SH, shq[L]);
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          for (int c = 0; c < CW; c++) fm[c][y][x] = byte'($urandom);
      run_layer(L, W, H);
      for (int c = 0; c < CW + COUT; c++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) frames[f][c][y][x] = fm[c][y][x];
    end
    fork
      begin send(0, 1); send(1, 0); end
      begin recv(0, 1); recv(1, 0); end
    join
    period = (t_last[1] - t_last[0]) / 10;
    expect_period = (W + R) * (H + R) + (H * W - (H - 2*R) * (W - 2*R))
                    + (H - 2*R) * (W - 2*R) * (COUT * K + 1);
    checks++;
    if (period != expect_period) begin
      failures++;
      $display("FAIL frame period %0d clocks, expected %0d", period, expect_period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
