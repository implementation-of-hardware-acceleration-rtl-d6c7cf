// tb_recover: streams two frames of random (I, K) pixel pairs through the
// recovery stage with random gaps on the input and random back-pressure on the
// output. Every output pixel is compared with J = K*I - K + 1 computed by the
// reference (original pixel in the 3-pixel border), and sof/eol are checked.
// A final pass with no gaps and no back-pressure checks the rate of one pixel
// per clock.
module tb_recover;
  import aod_pkg::*;
  import aod_ref_pkg::*;
  localparam int W = 11, H = 9, NF = 2;

  logic clk = 0, rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_sof, out_eol;
  logic [2:0][7:0] in_img = '0, in_k = '0, out_pix;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  int checks = 0, failures = 0;
  bit gaps = 1;

  recover #(.W(W), .H(H), .BORDER(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic cfg(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = CFG_AW'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic send_frame();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int c = 0; c < 3; c++) begin in_img[c] = fm[c][y][x]; in_k[c] = fm[15+c][y][x]; end
        #1 while (!in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
  endtask

  task automatic recv_frame(output longint cyc);
    longint t0 = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1 while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
          #1;
        end
        if (y == 0 && x == 0) t0 = longint'($time);
        if (y == H - 1 && x == W - 1) cyc = (longint'($time) - t0) / 10;
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (out_pix[c] != jref[c][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL (%0d,%0d) c%0d got %0d exp %0d", y, x, c, out_pix[c], jref[c][y][x]);
          end
        end
        checks++;
        if (out_sof != (x == 0 && y == 0) || out_eol != (x == W - 1)) begin
          failures++;
          $display("FAIL flags at (%0d,%0d)", y, x);
        end
      end
  endtask

  initial begin
    longint cyc;
    zk = 7; mk = 70; sk = 14;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg(REG_ZK, zk); cfg(REG_MK, mk); cfg(REG_SK, sk);
    for (int f = 0; f <= NF; f++) begin
      gaps = (f < NF);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          for (int c = 0; c < 3; c++) begin
            fm[c][y][x] = byte'($urandom);
            fm[15+c][y][x] = byte'($urandom);
          end
      for (int l = 1; l <= 5; l++) bq[l] = '{0, 0, 0};
      // run_net's recovery part only reads fm[0..2] and fm[15..17]; keep the layers out of it
      begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++)
            for (int c = 0; c < 3; c++) begin
              if (y < 3 || y >= H - 3 || x < 3 || x >= W - 3) jref[c][y][x] = fm[c][y][x];
              else begin
                longint p, v;
                p = longint'(int'(fm[c][y][x]) - 255) * longint'(int'(fm[15+c][y][x]) - zk) * mk;
                p = p + (longint'(1) << (sk - 1));
                v = (p >>> sk) + 255;
                jref[c][y][x] = byte'(v < 0 ? 0 : (v > 255 ? 255 : v));
              end
            end
      end
      fork
        send_frame();
        recv_frame(cyc);
      join
      if (!gaps) begin
        checks++;
        if (cyc != W * H - 1) begin
          failures++;
          $display("FAIL rate: %0d clocks between first and last pixel, expected %0d", cyc, W * H - 1);
        end
      end
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
