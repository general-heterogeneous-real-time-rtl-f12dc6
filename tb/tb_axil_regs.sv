// tb_axil_regs: AXI4-Lite master tasks exercise the register block: reset
// values, full and byte-strobed writes, read-back, read-only status words,
// unmapped reads, the field outputs, and responses held while the master
// is not ready.
module tb_axil_regs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [4:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  logic fifo_rst, fifo_rd_en, pkt_enable, pkt_rst;
  logic [2:0] lo_step;
  logic [5:0] out_shift;
  logic [3:0] user_data;
  logic [31:0] dest_ip;
  logic [15:0] dest_port;
  logic [31:0] status_i = 32'hCAFE_0001, drops_i = 32'd77;

  axil_regs dut (.clk, .rst,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .fifo_rst, .fifo_rd_en, .pkt_enable, .pkt_rst, .lo_step, .out_shift, .user_data,
    .dest_ip, .dest_port, .status_i, .drops_i);

  int checks = 0, failures = 0;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d, input logic [3:0] s, input int bdelay = 0);
    awaddr <= a; wdata <= d; wstrb <= s; awvalid <= 1; wvalid <= 1; bready <= 0;
    do @(posedge clk); while (!awready);
    awvalid <= 0; wvalid <= 0;
    repeat (bdelay) begin @(posedge clk); chk(32'(bvalid), 1, "bvalid held"); end
    bready <= 1;
    do @(posedge clk); while (!bvalid);
    chk(32'(bresp), 0, "bresp");
    bready <= 0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    araddr <= a; arvalid <= 1; rready <= 0;
    do @(posedge clk); while (!arready);
    arvalid <= 0;
    @(posedge clk);
    @(posedge clk);
    chk(32'(rvalid), 1, "rvalid held");
    d = rdata;
    rready <= 1;
    @(posedge clk);
    rready <= 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    rd(5'h04, d); chk(d, 1, "LO_STEP reset");
    rd(5'h08, d); chk(d, 28, "OUT_SHIFT reset");
    rd(5'h00, d); chk(d, 0, "CTRL reset");
    wr(5'h00, 32'h6, 4'hF, 2);
    chk({28'd0, pkt_rst, pkt_enable, fifo_rd_en, fifo_rst}, 32'h6, "CTRL fields");
    wr(5'h10, 32'hC0A8_0102, 4'hF);
    wr(5'h10, 32'h0000_0A00, 4'b0010);
    chk(dest_ip, 32'hC0A8_0A02, "IP byte strobe");
    wr(5'h14, 32'd60000, 4'hF);
    chk(32'(dest_port), 60000, "port");
    wr(5'h0C, 32'h5, 4'hF);
    chk(32'(user_data), 5, "user");
    wr(5'h04, 32'h3, 4'hF);
    chk(32'(lo_step), 3, "lo_step field");
    wr(5'h08, 32'd20, 4'hF);
    chk(32'(out_shift), 20, "out_shift field");
    wr(5'h18, 32'hFFFF_FFFF, 4'hF);   // read-only: ignored
    rd(5'h18, d); chk(d, 32'hCAFE_0001, "STATUS");
    rd(5'h1C, d); chk(d, 77, "DROPS");
    rd(5'h10, d); chk(d, 32'hC0A8_0A02, "IP read-back");
    rd(5'h00, d); chk(d, 32'h6, "CTRL read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
