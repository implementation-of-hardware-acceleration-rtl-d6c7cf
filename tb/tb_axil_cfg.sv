// tb_axil_cfg: AXI4-Lite writes with address and data arriving in either
// order and with a delayed bready; checks that each write produces exactly one
// cfg_we pulse with the right word address and data, that every write gets one
// OKAY response, and that reads of word 0 return the status input.
module tb_axil_cfg;
  localparam int AW = 16;

  logic clk = 0, rst_n = 1;
  logic [AW-1:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic [31:0] wdata = '0, rdata, status;
  logic [3:0] wstrb = 4'hF;
  logic [1:0] bresp, rresp;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic cfg_we;
  logic [AW-3:0] cfg_addr;
  logic [31:0] cfg_wdata;
  int checks = 0, failures = 0, pulses = 0;
  logic [AW-3:0] last_addr;
  logic [31:0] last_data;

  axil_cfg #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (cfg_we) begin
    pulses++;
    last_addr <= cfg_addr;
    last_data <= cfg_wdata;
  end

  task automatic axi_write(logic [AW-1:0] a, logic [31:0] d);
    int p0 = pulses;
    int order = $urandom_range(0, 2);
    @(negedge clk);
    // order 1: data first, order 2: address first, order 0: both together
    if (order == 2) begin awaddr = a; awvalid = 1; end
    if (order == 1) begin wdata = d; wvalid = 1; end
    if (order != 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    #1 while (!(awready && wready)) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 awvalid = 0; wvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    bready = 1;
    #1 while (!bvalid) begin @(negedge clk); #1; end
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL bresp"); end
    @(posedge clk);
    #1 bready = 0;
    @(negedge clk);
    checks++;
    if (pulses != p0 + 1 || last_addr != a[AW-1:2] || last_data != d) begin
      failures++;
      $display("FAIL write a=%h d=%h: pulses %0d addr %h data %h", a, d, pulses - p0, last_addr, last_data);
    end
  endtask

  task automatic axi_read(logic [AW-1:0] a, logic [31:0] exp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1 while (!arready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 arvalid = 0; rready = 1;
    while (!rvalid) begin @(negedge clk); #1; end
    checks++;
    if (rdata != exp || rresp != 2'b00) begin failures++; $display("FAIL read a=%h got %h exp %h", a, rdata, exp); end
    @(posedge clk);
    #1 rready = 0;
  endtask

  initial begin
    status = 32'h1234_5678;
    #1 rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) axi_write(AW'($urandom) & ~AW'(3), $urandom);
    axi_read(16'h0000, 32'h1234_5678);
    status = 32'd42;
    axi_read(16'h0000, 32'd42);
    axi_read(16'h0010, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
