// recover: clean-image recovery and border handling at the end of the network.
//
// The last convolution estimates a per-pixel, per-colour factor K; the
// defogged pixel is J = K*I - K + b with b = 1 and I, J in [0,1]. With
// I = qI/255, J = qJ/255 and K = S_K*(qK - Z_K), S_K = mk/2^sk:
//   qJ = 255 + (((qI - 255) * (qK - Z_K) * mk + 2^(sk-1)) >>> sk),  clamped to [0,255]
// (the clamp also gives the ReLU on the output). Pixels closer than BORDER to
// an image edge are not convolved properly, so the original hazy pixel is
// sent instead. The unit counts pixels in raster order to know the position,
// marks the first pixel of a frame (sof) and the last pixel of each line (eol)
// for the AXI4-Stream video side, and holds one output register with
// valid/ready flow control (one pixel per clock when not stalled, one clock of
// latency). The border width of three pixels and the recovery formula follow
// the described model; the fixed-point encoding of S_K and b = 1 are this
// design's choices.
//
// Configuration: cfg_we writes Z_K at REG_ZK, mk at REG_MK and sk at REG_SK.
module recover
  import aod_pkg::*;
#(
  parameter int unsigned W      = 640,
  parameter int unsigned H      = 480,
  parameter int unsigned BORDER = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [2:0][DBITS-1:0]   in_img,   // hazy pixel I
  input  logic [2:0][DBITS-1:0]   in_k,     // quantized K
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [2:0][DBITS-1:0]   out_pix,
  output logic                    out_sof,
  output logic                    out_eol,
  input  logic                    cfg_we,
  input  logic [CFG_AW-1:0]       cfg_addr,
  input  logic [31:0]             cfg_wdata
);

  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);

  pix_t             zk;
  logic [MBITS-1:0] mk;
  logic [SBITS-1:0] sk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zk <= '0;
      mk <= '0;
      sk <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == CFG_AW'(REG_ZK)) zk <= cfg_wdata[DBITS-1:0];
      if (cfg_addr == CFG_AW'(REG_MK)) mk <= cfg_wdata[MBITS-1:0];
      if (cfg_addr == CFG_AW'(REG_SK)) sk <= cfg_wdata[SBITS-1:0];
    end
  end

  logic [XW-1:0] px;
  logic [YW-1:0] py;
  logic          take, in_border;
  logic [2:0][DBITS-1:0] j;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  assign in_border = (px < XW'(BORDER)) || (px >= XW'(W - BORDER)) ||
                     (py < YW'(BORDER)) || (py >= YW'(H - BORDER));

  localparam int unsigned PW = 2 * (DBITS + 1) + MBITS + 2;
  logic signed [PW-1:0] di, dk, p, r, v;
  always_comb begin
    {di, dk, p, r, v} = '0;
    for (int c = 0; c < 3; c++) begin
      di = PW'($signed({1'b0, in_img[c]})) - PW'(255);
      dk = PW'($signed({1'b0, in_k[c]})) - PW'($signed({1'b0, zk}));
      p = di * dk * PW'($signed({1'b0, mk}));
      r = (sk == '0) ? '0 : (PW'(1) <<< (sk - 1'b1));
      v = ((p + r) >>> sk) + PW'(255);
      if (in_border)          j[c] = in_img[c];
      else if (v < 0)         j[c] = '0;
      else if (v > PW'(255))  j[c] = 8'd255;
      else                    j[c] = v[DBITS-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0;
      py <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_sof   <= 1'b0;
      out_eol   <= 1'b0;
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        out_pix   <= j;
        out_sof   <= (px == '0) && (py == '0);
        out_eol   <= (px == XW'(W - 1));
        if (px == XW'(W - 1)) begin
          px <= '0;
          py <= (py == YW'(H - 1)) ? '0 : py + 1'b1;
        end else begin
          px <= px + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
