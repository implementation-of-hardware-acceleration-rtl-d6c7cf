// aod_net_core: streaming, quantized AOD-Net single-image defogging core.
//
// AOD-Net estimates one per-pixel factor K(x) from the hazy image I and
// recovers the clean image as J = K*I - K + 1. K comes from five small
// convolutions whose inputs are concatenations of earlier outputs:
//   c1 = relu(conv1x1(I))          3 -> 3
//   c2 = relu(conv3x3(c1))         3 -> 3
//   c3 = relu(conv5x5(c1,c2))      6 -> 3
//   c4 = relu(conv7x7(c2,c3))      6 -> 3
//   K  = relu(conv3x3(c1,c2,c3,c4)) 12 -> 3
// Each convolution is a conv_layer with its own line buffer and window
// buffer, all five running concurrently on one pixel stream. Every layer
// passes the channels later layers still need along with its own output, so
// the stream widens from 3 channels (I) to 18 (I, c1..c4, K) and every
// concatenation is formed from aligned pixels without extra frame storage.
// recover then forms J and substitutes the original pixel in the 3-pixel
// border, where the convolutions are not computed.
//
// Arithmetic is integer only: 8-bit activations, 5-bit weights with zero
// points, 32-bit accumulators, and multiply-and-shift rescaling. All weights
// and constants are written through the AXI4-Lite port (word address bits
// [13:11] select recover (0) or layer 1..5, bits [10:0] the register, see
// aod_pkg and conv_layer).
//
// Interfaces: AXI4-Stream video in and out, 24-bit RGB per beat (channel 0
// in bits [7:0]); the output carries tuser on the first pixel of a frame and
// tlast on the last pixel of every line. The input's tuser/tlast are not
// checked: frames must be exactly W x H pixels. Timing: the 7x7 layer is the
// slowest and sets the rate, 23 clocks per interior pixel (1 window shift +
// 3*7 MAC row passes + 1 output), about 7.06 million clocks per 640x480
// frame; the other layers stall behind it through valid/ready.
//
// The network, the line/window buffer convolution, AXI4-Stream video ports,
// 5-bit weights and the border pass-through follow the described core; the
// channel-carrying stream, the MAC schedule and the register map are this
// design's choices.
module aod_net_core
  import aod_pkg::*;
#(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  // AXI4-Stream video in (hazy image)
  input  logic [23:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  // AXI4-Stream video out (defogged image)
  output logic [23:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast,
  // AXI4-Lite configuration
  input  logic [15:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [15:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready
);

  // ---------------- configuration ----------------
  logic        cfg_we;
  logic [13:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [31:0] frames;
  logic [5:0]  sel_we;

  axil_cfg #(.ADDR_W(16)) u_cfg (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid), .wready(s_axil_wready),
    .bresp(s_axil_bresp), .bvalid(s_axil_bvalid), .bready(s_axil_bready),
    .araddr(s_axil_araddr), .arvalid(s_axil_arvalid), .arready(s_axil_arready),
    .rdata(s_axil_rdata), .rresp(s_axil_rresp), .rvalid(s_axil_rvalid), .rready(s_axil_rready),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .status(frames)
  );

  always_comb begin
    sel_we = '0;
    if (cfg_addr[13:11] <= 3'd5) sel_we[cfg_addr[13:11]] = cfg_we;
  end

  // ---------------- layer chain ----------------
  logic                    v0, r0, v1, r1, v2, r2, v3, r3, v4, r4, v5, r5;
  logic [2:0][DBITS-1:0]   d0;
  logic [5:0][DBITS-1:0]   d1;
  logic [8:0][DBITS-1:0]   d2;
  logic [11:0][DBITS-1:0]  d3;
  logic [14:0][DBITS-1:0]  d4;
  logic [17:0][DBITS-1:0]  d5;

  assign v0 = s_axis_tvalid;
  assign d0 = s_axis_tdata;
  assign s_axis_tready = r0;

  // conv1: 1x1 on I
  conv_layer #(.W(W), .H(H), .K(1), .CW(3),  .WLO(0), .CIN(3),  .COUT(3)) u_conv1 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v0), .in_ready(r0), .in_data(d0),
    .out_valid(v1), .out_ready(r1), .out_data(d1),
    .cfg_we(sel_we[1]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  // conv2: 3x3 on c1
  conv_layer #(.W(W), .H(H), .K(3), .CW(6),  .WLO(3), .CIN(3),  .COUT(3)) u_conv2 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v1), .in_ready(r1), .in_data(d1),
    .out_valid(v2), .out_ready(r2), .out_data(d2),
    .cfg_we(sel_we[2]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  // conv3: 5x5 on concat(c1, c2)
  conv_layer #(.W(W), .H(H), .K(5), .CW(9),  .WLO(3), .CIN(6),  .COUT(3)) u_conv3 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v2), .in_ready(r2), .in_data(d2),
    .out_valid(v3), .out_ready(r3), .out_data(d3),
    .cfg_we(sel_we[3]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  // conv4: 7x7 on concat(c2, c3)
  conv_layer #(.W(W), .H(H), .K(7), .CW(12), .WLO(6), .CIN(6),  .COUT(3)) u_conv4 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v3), .in_ready(r3), .in_data(d3),
    .out_valid(v4), .out_ready(r4), .out_data(d4),
    .cfg_we(sel_we[4]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  // conv5: 3x3 on concat(c1, c2, c3, c4) -> K
  conv_layer #(.W(W), .H(H), .K(3), .CW(15), .WLO(3), .CIN(12), .COUT(3)) u_conv5 (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v4), .in_ready(r4), .in_data(d4),
    .out_valid(v5), .out_ready(r5), .out_data(d5),
    .cfg_we(sel_we[5]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  // ---------------- clean image ----------------
  logic [2:0][DBITS-1:0] jpix;

  recover #(.W(W), .H(H), .BORDER(3)) u_rec (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .in_valid(v5), .in_ready(r5), .in_img(d5[2:0]), .in_k(d5[17:15]),
    .out_valid(m_axis_tvalid), .out_ready(m_axis_tready), .out_pix(jpix),
    .out_sof(m_axis_tuser), .out_eol(m_axis_tlast),
    .cfg_we(sel_we[0]), .cfg_addr(cfg_addr[CFG_AW-1:0]), .cfg_wdata(cfg_wdata));

  assign m_axis_tdata = jpix;

  // Status register: number of frames whose first output pixel was delivered.
  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) frames <= '0;
    else if (m_axis_tvalid && m_axis_tready && m_axis_tuser) frames <= frames + 1'b1;
  end

endmodule
