// conv_layer: one streaming KxK convolution layer of the defogging network.
//
// The input is a raster-order stream of W x H pixels, each a vector of CW
// 8-bit channels ("carried" channels). The layer convolves channels
// [WLO, WLO+CIN) with COUT quantized KxK filters, applies bias, rescale and
// ReLU (see requant), and emits a stream of W x H pixels of CW+COUT channels:
// the CW carried channels of the centre pixel unchanged (bits [CW*8-1:0]) with
// the COUT new channels appended above them. Carrying channels lets the next
// layers see earlier feature maps aligned to the same pixel, which is how the
// network's concatenations are formed.
//
// Data path: a line buffer of K-1 lines and a KxK window buffer. A scan counter
// runs over (H+R) x (W+R) positions, R = (K-1)/2: inside the image each position
// consumes one input pixel, beyond the right or bottom edge it shifts in zeros.
// At scan position (y, x) with y >= R and x >= R the window is centred on
// pixel (y-R, x-R). Boundary pixels (centre closer than R to an edge) are not
// convolved: their new channels are the centre's first COUT convolved input
// channels, passed through unchanged. Interior pixels are computed by one MAC
// pass per (output channel, kernel row): COUT*K cycles, each summing K*CIN
// products (q_x - Z_x)*(q_w - Z_w) into that channel's accumulator, which
// starts from the bias.
//
// Timing per scan position: 1 cycle to shift the window, then for an output
// pixel 1 cycle (boundary) or COUT*K+1 cycles (interior) to produce the result
// into the output register. in_ready / out_valid follow valid/ready stream
// rules; the core stalls while its output register is full.
//
// Configuration: cfg_we with word address cfg_addr writes weight i at address
// i (i = ((oc*K + kr)*K + kc)*CIN + ic, low WBITS bits), bias of channel oc at
// REG_BIAS+oc and the qparam_t fields at REG_ZX..REG_SH (aod_pkg).
//
// The line/window buffer structure and the boundary pass-through follow the
// described core; the carried-channel stream, the per-row MAC schedule and the
// register map are this design's choices.
module conv_layer
  import aod_pkg::*;
#(
  parameter int unsigned W    = 640,
  parameter int unsigned H    = 480,
  parameter int unsigned K    = 3,
  parameter int unsigned CW   = 3,
  parameter int unsigned WLO  = 0,
  parameter int unsigned CIN  = 3,
  parameter int unsigned COUT = 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // input stream
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [CW-1:0][DBITS-1:0]       in_data,
  // output stream
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [CW+COUT-1:0][DBITS-1:0]  out_data,
  // configuration writes
  input  logic                           cfg_we,
  input  logic [CFG_AW-1:0]              cfg_addr,
  input  logic [31:0]                    cfg_wdata
);

  localparam int unsigned R   = (K - 1) / 2;
  localparam int unsigned NW  = COUT * K * K * CIN;
  localparam int unsigned DW  = CW * DBITS;
  localparam int unsigned XW  = $clog2(W + R + 1);
  localparam int unsigned YW  = $clog2(H + R + 1);
  localparam int unsigned OCW = (COUT > 1) ? $clog2(COUT) : 1;
  localparam int unsigned KRW = (K > 1) ? $clog2(K) : 1;

  initial begin
    assert (K % 2 == 1) else $error("conv_layer: K must be odd");
    assert (WLO + CIN <= CW) else $error("conv_layer: window channels exceed carried channels");
    assert (COUT <= CIN) else $error("conv_layer: boundary pass-through needs COUT <= CIN");
    assert (NW <= REG_BIAS) else $error("conv_layer: too many weights for the register map");
  end

  // ---------------- configuration registers ----------------
  wgt_t    wmem [NW];
  acc_t    bias [COUT];
  qparam_t qp;

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_addr < CFG_AW'(NW)) wmem[cfg_addr[$clog2(NW)-1:0]] <= cfg_wdata[WBITS-1:0];
      for (int oc = 0; oc < COUT; oc++)
        if (cfg_addr == CFG_AW'(REG_BIAS + oc)) bias[oc] <= cfg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qp <= '0;
    else if (cfg_we) begin
      unique case (cfg_addr)
        CFG_AW'(REG_ZX): qp.zx <= cfg_wdata[DBITS-1:0];
        CFG_AW'(REG_ZW): qp.zw <= cfg_wdata[WBITS-1:0];
        CFG_AW'(REG_ZY): qp.zy <= cfg_wdata[DBITS-1:0];
        CFG_AW'(REG_M):  qp.m  <= cfg_wdata[MBITS-1:0];
        CFG_AW'(REG_SH): qp.sh <= cfg_wdata[SBITS-1:0];
        default: ;
      endcase
    end
  end

  // ---------------- scan control ----------------
  typedef enum logic [1:0] {S_SCAN, S_EMIT, S_MAC, S_DONE} state_t;
  state_t st;

  logic [XW-1:0]  sx;
  logic [YW-1:0]  sy;
  logic [OCW-1:0] oc_i;
  logic [KRW-1:0] kr_i;
  acc_t           acc [COUT];

  logic need_in, is_out, can_shift, shift, out_free, last_pos;
  logic [CW+COUT-1:0][DBITS-1:0] result;
  logic                          load_out;

  assign need_in  = (sy < YW'(H)) && (sx < XW'(W));
  assign is_out   = (sy >= YW'(R)) && (sx >= XW'(R));
  assign out_free = !out_valid || out_ready;
  assign last_pos = (sy == YW'(H + R - 1)) && (sx == XW'(W + R - 1));
  assign can_shift = (st == S_SCAN) && (!need_in || in_valid);
  assign shift    = can_shift;
  assign in_ready = (st == S_SCAN) && need_in;

  // Window centre is pixel (sy-R, sx-R) once the shift for (sy, sx) is done.
  logic boundary;
  always_comb begin
    boundary = (sy < YW'(2 * R)) || (sy >= YW'(H)) ||
               (sx < XW'(2 * R)) || (sx >= XW'(W));
  end

  // ---------------- line buffer + window ----------------
  logic [DW-1:0]                 din;
  logic [K-1:0][DW-1:0]          col_in;
  logic [K-1:0][K-1:0][DW-1:0]   win;

  assign din = need_in ? in_data : '0;

  if (K > 1) begin : g_lb
    logic [K-2:0][DW-1:0] lb_col;
    logic [$clog2(W)-1:0] lb_addr;
    assign lb_addr = (sx < XW'(W)) ? sx[$clog2(W)-1:0] : '0;
    line_buffer #(.W(W), .ROWS(K - 1), .DW(DW)) u_lb (
      .clk     (clk),
      .shift_en(shift && (sx < XW'(W))),
      .col     (lb_addr),
      .din     (din),
      .dout    (lb_col)
    );
    always_comb begin
      for (int r = 0; r < K - 1; r++) col_in[r] = (sx < XW'(W)) ? lb_col[r] : '0;
      col_in[K-1] = din;
    end
  end else begin : g_nolb
    assign col_in[0] = din;
  end

  window_buffer #(.K(K), .DW(DW)) u_win (
    .clk     (clk),
    .shift_en(shift),
    .col_in  (col_in),
    .win     (win)
  );

  // ---------------- MAC: one (output channel, kernel row) per cycle ----------------
  acc_t       row_sum, xd, wd;
  pix_t       xv;
  wgt_t       wv;
  always_comb begin
    row_sum = '0;
    {xd, wd, xv, wv} = '0;
    for (int kc = 0; kc < K; kc++) begin
      for (int ic = 0; ic < CIN; ic++) begin
        xv = win[kr_i][kc][(WLO+ic)*DBITS +: DBITS];
        wv = wmem[((int'(oc_i) * K + int'(kr_i)) * K + kc) * CIN + ic];
        xd = ACCBITS'($signed({1'b0, xv})) - ACCBITS'($signed({1'b0, qp.zx}));
        wd = ACCBITS'($signed({1'b0, wv})) - ACCBITS'($signed({1'b0, qp.zw}));
        row_sum += xd * wd;
      end
    end
  end

  // ---------------- requantization ----------------
  pix_t yq [COUT];
  for (genvar g = 0; g < COUT; g++) begin : g_rq
    requant u_rq (.acc(acc[g]), .qp(qp), .q(yq[g]));
  end

  always_comb begin
    result = '0;
    result[CW-1:0] = win[R][R];
    for (int oc = 0; oc < COUT; oc++) begin
      if (st == S_EMIT) result[CW+oc] = win[R][R][(WLO+oc)*DBITS +: DBITS];
      else              result[CW+oc] = yq[oc];
    end
  end

  assign load_out = ((st == S_EMIT) || (st == S_DONE)) && out_free;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_SCAN;
      sx   <= '0;
      sy   <= '0;
      oc_i <= '0;
      kr_i <= '0;
      for (int oc = 0; oc < COUT; oc++) acc[oc] <= '0;
    end else begin
      unique case (st)
        S_SCAN: if (shift) begin
          if (is_out) begin
            if (boundary) st <= S_EMIT;
            else begin
              st   <= S_MAC;
              oc_i <= '0;
              kr_i <= '0;
              for (int oc = 0; oc < COUT; oc++) acc[oc] <= bias[oc];
            end
          end else begin
            sx <= (sx == XW'(W + R - 1)) ? '0 : sx + 1'b1;
            if (sx == XW'(W + R - 1)) sy <= last_pos ? '0 : sy + 1'b1;
          end
        end
        S_MAC: begin
          acc[oc_i] <= acc[oc_i] + row_sum;
          if (kr_i == KRW'(K - 1)) begin
            kr_i <= '0;
            if (oc_i == OCW'(COUT - 1)) st <= S_DONE;
            else oc_i <= oc_i + 1'b1;
          end else begin
            kr_i <= kr_i + 1'b1;
          end
        end
        S_EMIT, S_DONE: if (out_free) begin
          st <= S_SCAN;
          sx <= (sx == XW'(W + R - 1)) ? '0 : sx + 1'b1;
          if (sx == XW'(W + R - 1)) sy <= last_pos ? '0 : sy + 1'b1;
        end
        default: st <= S_SCAN;
      endcase
    end
  end

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (load_out) begin
        out_valid <= 1'b1;
        out_data  <= result;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // Stream rule: a presented output must stay until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
