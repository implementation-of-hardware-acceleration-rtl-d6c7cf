// axil_cfg: AXI4-Lite slave that carries the core's configuration writes.
//
// The host writes the quantized weights, biases and quantization constants of
// every layer through this port before it starts streaming frames. A write is
// accepted when address and data are both valid and no write response is
// pending (awready and wready rise together for one clock); in that clock
// cfg_we pulses with cfg_addr = awaddr / 4 (word address) and cfg_wdata =
// wdata, and a response OKAY follows on the next clock. Byte strobes are not
// supported: every write is a full 32-bit word. Reads of word 0 return the
// `status` input, other addresses read as zero; a read response follows one
// clock after the address is taken. That the core is configured from the host
// follows the described system; the register interface itself is this
// design's choice.
module axil_cfg #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // write address / data / response
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  // read address / data
  input  logic [ADDR_W-1:0] araddr,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rvalid,
  input  logic              rready,
  // to the core
  output logic              cfg_we,
  output logic [ADDR_W-3:0] cfg_addr,
  output logic [31:0]       cfg_wdata,
  input  logic [31:0]       status
);

  logic wr_take;
  assign wr_take  = awvalid && wvalid && !bvalid;
  assign awready  = wr_take;
  assign wready   = wr_take;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;
  assign arready  = !rvalid;

  assign cfg_we    = wr_take;
  assign cfg_addr  = awaddr[ADDR_W-1:2];
  assign cfg_wdata = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (wr_take)          bvalid <= 1'b1;
      else if (bready)      bvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rdata  <= (araddr[ADDR_W-1:2] == '0) ? status : '0;
      end else if (rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // Byte strobes are outside this port's protocol subset.
  a_full_word: assert property (@(posedge clk) disable iff (!rst_n)
    wr_take |-> wstrb == 4'hF);
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid);

endmodule
