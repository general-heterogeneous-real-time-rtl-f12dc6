// axil_regs: software registers of the front-end, written by the processing
// system over AXI4-Lite.
//
// The client software sets up the firmware through these registers: it
// resets and starts the capture FIFOs, starts the packetizer, supplies the
// 4-bit user header field and the destination IP address and UDP port of the
// GPU server, and chooses the mixer LO and output scaling.
//
// Register map (32-bit, byte address):
//   0x00 CTRL      [0] fifo_rst  [1] fifo_rd_en  [2] pkt_enable  [3] pkt_rst
//   0x04 LO_STEP   [2:0] LO frequency in units of fs/8 (reset 1 = 256 MHz)
//   0x08 OUT_SHIFT [5:0] requantizer shift (reset 28)
//   0x0C USER      [3:0] user field of the frame header
//   0x10 DEST_IP   IPv4 address
//   0x14 DEST_PORT [15:0] UDP port
//   0x18 STATUS    read only, status_i
//   0x1C DROPS     read only, drops_i
// Writes to read-only or unmapped addresses are accepted and ignored; reads
// of unmapped addresses return 0. Byte strobes are honoured.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending; BVALID follows one clock later. A read is taken when
// ARVALID is high and no read data is pending; RVALID follows one clock
// later. Responses are always OKAY. The register set follows the settings
// the source scheme says the client provides; addresses, reset values and
// the bus handshake details are this design's choices.
module axil_regs (
  input  logic        clk,
  input  logic        rst,
  // write address / data / response
  input  logic [4:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  // read address / data
  input  logic [4:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // register fields
  output logic        fifo_rst,
  output logic        fifo_rd_en,
  output logic        pkt_enable,
  output logic        pkt_rst,
  output logic [2:0]  lo_step,
  output logic [5:0]  out_shift,
  output logic [3:0]  user_data,
  output logic [31:0] dest_ip,
  output logic [15:0] dest_port,
  input  logic [31:0] status_i,
  input  logic [31:0] drops_i
);
  logic [31:0] regs [6];
  logic        wr_go, rd_go;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_go     = s_awready;
  assign s_arready = !s_rvalid;
  assign rd_go     = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      regs[0]  <= 32'h0;
      regs[1]  <= 32'd1;
      regs[2]  <= 32'd28;
      regs[3]  <= 32'h0;
      regs[4]  <= 32'h0;
      regs[5]  <= 32'h0;
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        if (s_awaddr[4:2] < 3'd6) begin
          for (int b = 0; b < 4; b++)
            if (s_wstrb[b]) regs[s_awaddr[4:2]][8*b +: 8] <= s_wdata[8*b +: 8];
        end
      end
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_go) begin
        s_rvalid <= 1'b1;
        case (s_araddr[4:2])
          3'd6:    s_rdata <= status_i;
          3'd7:    s_rdata <= drops_i;
          default: s_rdata <= regs[s_araddr[4:2]];
        endcase
      end
    end
  end

  assign fifo_rst   = regs[0][0];
  assign fifo_rd_en = regs[0][1];
  assign pkt_enable = regs[0][2];
  assign pkt_rst    = regs[0][3];
  assign lo_step    = regs[1][2:0];
  assign out_shift  = regs[2][5:0];
  assign user_data  = regs[3][3:0];
  assign dest_ip    = regs[4];
  assign dest_port  = regs[5][15:0];

  // AXI rule: a response, once valid, stays valid until accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
