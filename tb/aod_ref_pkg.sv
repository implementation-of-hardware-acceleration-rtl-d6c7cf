// aod_ref_pkg: bit-exact software reference of the quantized defogging network,
// used by the testbenches. It is written directly from the arithmetic
// (zero-point subtraction, multiply, rounding shift, ReLU clamp, J = K*I - K + 1)
// and works on whole feature maps, independently of the streaming hardware.
// Channel layout of fm: 0..2 hazy image I, 3..5 c1, 6..8 c2, 9..11 c3,
// 12..14 c4, 15..17 K. Images up to MAXW x MAXH.
package aod_ref_pkg;

  localparam int MAXW = 640;
  localparam int MAXH = 480;

  // layer description: kernel size, first input channel, input channels, first output channel
  localparam int LK   [1:5] = '{1, 3, 5, 7, 3};
  localparam int LLO  [1:5] = '{0, 3, 3, 6, 3};
  localparam int LCIN [1:5] = '{3, 3, 6, 6, 12};
  localparam int LOUT [1:5] = '{3, 6, 9, 12, 15};

  byte unsigned fm [18][MAXH][MAXW];
  byte unsigned jref [3][MAXH][MAXW];
  // per-frame stimulus and expected output kept by the end-to-end tests
  byte unsigned img_f  [2][3][MAXH][MAXW];
  byte unsigned jexp_f [2][3][MAXH][MAXW];

  int wq   [1:5][1024];    // 5-bit weights
  int bq   [1:5][3];
  int zx   [1:5];
  int zw   [1:5];
  int zy   [1:5];
  int mq   [1:5];
  int shq  [1:5];
  int zk, mk, sk;

  function automatic int rq(longint acc, int m, int sh, int z);
    longint p = acc * longint'(m);
    longint y;
    if (sh > 0) p = p + (longint'(1) << (sh - 1));
    y = (p >>> sh) + z;
    if (y < z) y = z;
    if (y > 255) y = 255;
    return int'(y);
  endfunction

  // Fill the configuration with reproducible pseudo-random values.
  function automatic void make_params(int seed);
    int s = seed;
    for (int l = 1; l <= 5; l++) begin
      for (int i = 0; i < 1024; i++) begin
        s = s * 1103515245 + 12345;
        wq[l][i] = (s >>> 16) & 31;
      end
      for (int o = 0; o < 3; o++) begin
        s = s * 1103515245 + 12345;
        bq[l][o] = ((s >>> 12) & 16'h3FFF) - 8000;
      end
      zx[l] = (l == 1) ? 0 : 2;
      zw[l] = 16;
      zy[l] = 1;
      mq[l] = 181 + 37 * l;
      shq[l] = (l == 1) ? 11 : 13 + l / 2;
    end
    zk = 5; mk = 80; sk = 14;
  endfunction

  function automatic void run_layer(int l, int w, int h);
    int k = LK[l], r = (LK[l] - 1) / 2;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int o = 0; o < 3; o++) begin
          if (y < r || y >= h - r || x < r || x >= w - r) begin
            fm[LOUT[l] + o][y][x] = fm[LLO[l] + o][y][x];
          end else begin
            longint acc = bq[l][o];
            for (int kr = 0; kr < k; kr++)
              for (int kc = 0; kc < k; kc++)
                for (int ic = 0; ic < LCIN[l]; ic++)
                  acc += longint'(int'(fm[LLO[l] + ic][y - r + kr][x - r + kc]) - zx[l]) *
                         longint'(wq[l][((o * k + kr) * k + kc) * LCIN[l] + ic] - zw[l]);
            fm[LOUT[l] + o][y][x] = byte'(rq(acc, mq[l], shq[l], zy[l]));
          end
        end
  endfunction

  function automatic void run_net(int w, int h);
    for (int l = 1; l <= 5; l++) run_layer(l, w, h);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        for (int c = 0; c < 3; c++) begin
          if (y < 3 || y >= h - 3 || x < 3 || x >= w - 3) jref[c][y][x] = fm[c][y][x];
          else begin
            longint p = longint'(int'(fm[c][y][x]) - 255) * longint'(int'(fm[15 + c][y][x]) - zk) * mk;
            longint v;
            if (sk > 0) p = p + (longint'(1) << (sk - 1));
            v = (p >>> sk) + 255;
            if (v < 0) v = 0;
            if (v > 255) v = 255;
            jref[c][y][x] = byte'(v);
          end
        end
  endfunction

endpackage
