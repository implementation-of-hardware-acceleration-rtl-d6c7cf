// tb_aod_net_full: one full 640x480 frame through the core at its default size.
//
// The top is instantiated with its default parameters. All five layers and the
// recovery stage are configured over AXI4-Lite from reproducible pseudo-random
// weights, then one frame of picture-like RGB data (a gradient plus noise) is
// streamed through AXI4-Stream with no gaps and no back-pressure. Every output
// pixel is compared with the reference network, tuser/tlast are checked on every
// beat, and the frame counter is read back. The run time must lie within 5 % above
// the 7x7 layer's own schedule (1 clock per scan position, 1 more per boundary
// pixel, 3*7+1 more per interior pixel), about 7 million clocks, which is 0.14 s
// at a 20 ns clock. Mechanism counts as in tb_aod_net_core.
module tb_aod_net_full;
  import aod_pkg::*;
  import aod_ref_pkg::*;
  localparam int W = 640, H = 480, NF = 1;
  localparam bit STALLS = 0;

  logic        ap_clk = 0, ap_rst_n = 1;
  logic [23:0] s_axis_tdata = '0, m_axis_tdata;
  logic        s_axis_tvalid = 0, s_axis_tready, s_axis_tuser = 0, s_axis_tlast = 0;
  logic        m_axis_tvalid, m_axis_tready = 0, m_axis_tuser, m_axis_tlast;
  logic [15:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic        s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0]  s_axil_wstrb = 4'hF;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready = 1;

  int checks = 0, failures = 0;
  int hh, ww, nwl, nf;  // run-time copies of the loop bounds used in timed loops
  longint t_last [NF];
  longint t_first;
  // mechanism counters
  int n_border = 0, n_relu = 0, n_sat = 0, n_jclamp = 0, n_src_stall = 0;
  int n_backpressure = 0, n_gaps = 0, n_frames = 0, n_status = 0;

  aod_net_core dut (.*);

  always #5 ap_clk = ~ap_clk;

  always @(posedge ap_clk) begin
    if (s_axis_tvalid && !s_axis_tready) n_src_stall++;
    if (m_axis_tvalid && !m_axis_tready) n_backpressure++;
  end

  task automatic axil_write(int sel, int regi, int d);
    @(negedge ap_clk);
    s_axil_awaddr = 16'((sel * 2048 + regi) * 4); s_axil_awvalid = 1;
    s_axil_wdata = d; s_axil_wvalid = 1;
    #1 while (!s_axil_awready) begin @(negedge ap_clk); #1; end
    @(posedge ap_clk);
    #1 s_axil_awvalid = 0; s_axil_wvalid = 0;
  endtask

  task automatic axil_read(output logic [31:0] d);
    @(negedge ap_clk);
    s_axil_araddr = '0; s_axil_arvalid = 1;
    #1 while (!s_axil_arready) begin @(negedge ap_clk); #1; end
    @(posedge ap_clk);
    #1 s_axil_arvalid = 0;
    while (!s_axil_rvalid) begin @(negedge ap_clk); #1; end
    d = s_axil_rdata;
  endtask

  task automatic send(int f, bit gaps);
    for (int y = 0; y < hh; y++)
      for (int x = 0; x < ww; x++) begin
        @(negedge ap_clk);
        while (gaps && $urandom_range(0, 4) == 0) begin s_axis_tvalid = 0; n_gaps++; @(negedge ap_clk); end
        s_axis_tvalid = 1;
        s_axis_tdata = {img_f[f][2][y][x], img_f[f][1][y][x], img_f[f][0][y][x]};
        s_axis_tuser = (x == 0 && y == 0);
        s_axis_tlast = (x == W - 1);
        #1 while (!s_axis_tready) begin @(negedge ap_clk); #1; end
        if (f == 0 && x == 0 && y == 0) t_first = longint'($time);
        @(posedge ap_clk);
        #1 s_axis_tvalid = 0;
      end
  endtask

  task automatic recv(int f, bit gaps);
    for (int y = 0; y < hh; y++)
      for (int x = 0; x < ww; x++) begin
        @(negedge ap_clk);
        m_axis_tready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
        #1 while (!(m_axis_tvalid && m_axis_tready)) begin
          @(negedge ap_clk);
          m_axis_tready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
          #1;
        end
        if (y == H - 1 && x == W - 1) t_last[f] = longint'($time);
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (m_axis_tdata[c*8 +: 8] != jexp_f[f][c][y][x]) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d (%0d,%0d) c%0d got %0d exp %0d", f, y, x, c, m_axis_tdata[c*8 +: 8], jexp_f[f][c][y][x]);
          end
        end
        checks++;
        if (m_axis_tuser != (x == 0 && y == 0) || m_axis_tlast != (x == W - 1)) begin
          failures++;
          $display("FAIL tuser/tlast at f%0d (%0d,%0d)", f, y, x);
        end
      end
    n_frames++;
  endtask

  initial begin
    logic [31:0] st;
    longint period, t4, total;
    make_params(11);
    hh = H; ww = W; nf = NF;
    #1 ap_rst_n = 0;
    repeat (3) @(negedge ap_clk);
    ap_rst_n = 1;
    for (int l = 1; l <= 5; l++) begin
      nwl = 3 * LK[l] * LK[l] * LCIN[l];
      for (int i = 0; i < nwl; i++) axil_write(l, i, wq[l][i]);
      for (int o = 0; o < 3; o++) axil_write(l, REG_BIAS + o, bq[l][o]);
      axil_write(l, REG_ZX, zx[l]); axil_write(l, REG_ZW, zw[l]); axil_write(l, REG_ZY, zy[l]);
      axil_write(l, REG_M, mq[l]); axil_write(l, REG_SH, shq[l]);
    end
    axil_write(0, REG_ZK, zk); axil_write(0, REG_MK, mk); axil_write(0, REG_SK, sk);

    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < hh; y++)
        for (int x = 0; x < ww; x++)
          for (int c = 0; c < 3; c++) begin
            // smooth gradient plus noise, like a real picture
            img_f[f][c][y][x] = byte'((x * 255) / W / 2 + (y * 255) / H / 3 + $urandom_range(0, 80) + 20 * c);
            fm[c][y][x] = img_f[f][c][y][x];
          end
      run_net(ww, hh);
      for (int y = 0; y < hh; y++)
        for (int x = 0; x < ww; x++) begin
          bit inner;
          inner = !(y < 3 || y >= H - 3 || x < 3 || x >= W - 3);
          if (!inner) n_border++;
          for (int c = 0; c < 3; c++) jexp_f[f][c][y][x] = jref[c][y][x];
          if (inner) begin
            for (int ch = 3; ch < 18; ch++) begin
              if (fm[ch][y][x] == zy[(ch / 3)]) n_relu++;
              if (fm[ch][y][x] == 255) n_sat++;
            end
            for (int c = 0; c < 3; c++) if (jref[c][y][x] == 0 || jref[c][y][x] == 255) n_jclamp++;
          end
        end
    end

    fork
      for (int f = 0; f < nf; f++) send(f, STALLS && f == 0);
      for (int f = 0; f < nf; f++) recv(f, STALLS && f == 0);
    join

    axil_read(st);
    checks++;
    if (st != 32'(NF)) begin failures++; $display("FAIL frame counter %0d, expected %0d", st, NF); end
    else n_status++;

    // The 7x7 layer sets the pace: 1 clock per scan position, 1 more per boundary
    // pixel, 3*7+1 more per interior pixel. The layers hand pixels over through a
    // single output register each, so where the 7x7 layer races through its
    // boundary pixels it waits for the 5x5 layer; on small frames, with many
    // boundary pixels, this costs up to the 5x5 layer's own interior time again.
    if (NF > 1) begin
      period = (t_last[NF-1] - t_last[NF-2]) / 10;
      t4 = (W + 3) * (H + 3) + (H * W - (H - 6) * (W - 6)) + (H - 6) * (W - 6) * 22;
      $display("frame period %0d clocks (7x7 layer alone: %0d)", period, t4);
      checks++;
      if (period < t4 || period > 2 * t4) begin
        failures++;
        $display("FAIL frame period %0d outside [%0d, %0d]", period, t4, 2 * t4);
      end
    end

    // Whole run, first input beat to last output beat.
    total = (t_last[NF-1] - t_first) / 10;
    t4 = (W + 3) * (H + 3) + (H * W - (H - 6) * (W - 6)) + (H - 6) * (W - 6) * 22;
    $display("%0d frame(s) of %0dx%0d in %0d clocks (7x7 layer alone: %0d per frame)", NF, W, H, total, t4);
    checks++;
    if (total < NF * t4 || total > NF * (t4 + t4 / 20)) begin
      failures++;
      $display("FAIL run time %0d clocks outside [%0d, %0d]", total, NF * t4, NF * (t4 + t4 / 20));
    end

    $display("mechanisms: border=%0d relu=%0d sat=%0d jclamp=%0d src_stall=%0d backpressure=%0d gaps=%0d frames=%0d status=%0d",
             n_border, n_relu, n_sat, n_jclamp, n_src_stall, n_backpressure, n_gaps, n_frames, n_status);
    if (n_border == 0)       begin failures++; $display("FAIL no border pixel"); end
    if (n_relu == 0)         begin failures++; $display("FAIL no ReLU clamp"); end
    if (n_sat == 0)          begin failures++; $display("FAIL no saturation"); end
    if (n_jclamp == 0)       begin failures++; $display("FAIL no recovery clamp"); end
    if (n_src_stall == 0)    begin failures++; $display("FAIL core never stalled its source"); end
    if (STALLS && n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (STALLS && n_gaps == 0)         begin failures++; $display("FAIL no input gap"); end
    if (n_frames != NF)      begin failures++; $display("FAIL frames %0d", n_frames); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * W * H * 30) @(posedge ap_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
