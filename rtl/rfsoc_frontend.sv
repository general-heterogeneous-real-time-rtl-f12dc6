// rfsoc_frontend: programmable-logic part of a dual-polarization RF
// pre-processing front-end that turns two directly sampled RF inputs into a
// stream of UDP-ready baseband frames.
//
// Data path (one chain per polarization, then merged):
//   RF-ADC stream (8 x 16-bit samples per ADC clock, 2048 MSps)
//   -> pol_channel : dual-clock FIFO 8x16 -> 16x16 bits, 16-channel SIPO
//   -> preproc     : parallel mixing by the LO, 672-tap polyphase
//                    decimation by 16 (coefficient-sharing structure),
//                    rounding to 8+8-bit complex, 128 MSps, 100 MHz wide
//   -> pkt_gen     : 8-sample SIPOs, interleave both polarizations into
//                    256 bits, slice to four 64-bit packets
//   -> pkt_fsm     : 1024-packet frames (2 header + 1022 data), EN and EOF
//   -> gbe_sync    : eight packets per 512-bit word, EN_512 / EOF_512
//   -> tx_*        : to the 100GbE core, with destination IP and port.
// axil_regs holds the software registers written by the processor.
//
// Clocks and resets: adc_clk is the ADC stream clock, clk the FPGA logic
// clock (both 256 MHz in the reference setup). rst is synchronous to clk and
// active high; the ADC side gets it, ORed with the software FIFO reset,
// through a reset synchronizer (so the same request is used asynchronously
// there and synchronously on clk; lint tools flag that mixed use, which is
// intended). The RF-ADCs, the clock chips, the processor
// and the 100GbE MAC are outside this module: their signals are its ports.
//
// Both polarization FIFOs are read with one enable, and only when neither
// is empty, so the two chains stay sample-aligned all the way to pkt_gen.
//
// The 2x16 channel structure, rates, filter order, frame format and the
// 512-bit output follow the source scheme; the register map, reset
// arrangement and status word are this design's choices.
module rfsoc_frontend
  import bb_pkg::*;
(
  // RF-ADC streams (ADC clock domain)
  input  logic                               adc_clk,
  input  logic [ADC_LANES-1:0][SAMPLE_W-1:0] adc0_data,
  input  logic                               adc0_valid,
  output logic                               adc0_ready,
  input  logic [ADC_LANES-1:0][SAMPLE_W-1:0] adc1_data,
  input  logic                               adc1_valid,
  output logic                               adc1_ready,
  // FPGA clock domain
  input  logic                               clk,
  input  logic                               rst,
  // AXI4-Lite software register port
  input  logic [4:0]                         s_awaddr,
  input  logic                               s_awvalid,
  output logic                               s_awready,
  input  logic [31:0]                        s_wdata,
  input  logic [3:0]                         s_wstrb,
  input  logic                               s_wvalid,
  output logic                               s_wready,
  output logic [1:0]                         s_bresp,
  output logic                               s_bvalid,
  input  logic                               s_bready,
  input  logic [4:0]                         s_araddr,
  input  logic                               s_arvalid,
  output logic                               s_arready,
  output logic [31:0]                        s_rdata,
  output logic [1:0]                         s_rresp,
  output logic                               s_rvalid,
  input  logic                               s_rready,
  // 100GbE transmit port
  output logic [GBE_W-1:0]                   tx_data,
  output logic                               tx_valid,
  output logic                               tx_eof,
  output logic [31:0]                        tx_dest_ip,
  output logic [15:0]                        tx_dest_port
);
  // ---------------- software registers ----------------
  logic        sw_fifo_rst, sw_rd_en, sw_pkt_en, sw_pkt_rst;
  logic [2:0]  lo_step;
  logic [5:0]  out_shift;
  logic [3:0]  user_data;
  logic [31:0] status, drops;

  axil_regs u_regs (
    .clk, .rst,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready, .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .fifo_rst(sw_fifo_rst), .fifo_rd_en(sw_rd_en), .pkt_enable(sw_pkt_en),
    .pkt_rst(sw_pkt_rst), .lo_step, .out_shift, .user_data,
    .dest_ip(tx_dest_ip), .dest_port(tx_dest_port),
    .status_i(status), .drops_i(drops)
  );

  // ---------------- resets ----------------
  logic cap_rst, adc_rst, pkt_rst;
  assign cap_rst = rst || sw_fifo_rst;
  assign pkt_rst = rst || sw_pkt_rst;

  rst_sync u_adc_rst (.clk(adc_clk), .rst_req(cap_rst), .rst_o(adc_rst));

  // ---------------- parallel data generation ----------------
  logic                          empty0, empty1, rd_en;
  logic [NCH-1:0][SAMPLE_W-1:0]  ch0, ch1;
  logic                          ch0_vld, ch1_vld;

  assign rd_en = sw_rd_en && !empty0 && !empty1;

  pol_channel u_pol0 (
    .adc_clk, .adc_rst, .adc_data(adc0_data), .adc_valid(adc0_valid), .adc_ready(adc0_ready),
    .clk, .rst(cap_rst), .rd_en, .empty(empty0), .ch_data(ch0), .ch_valid(ch0_vld)
  );
  pol_channel u_pol1 (
    .adc_clk, .adc_rst, .adc_data(adc1_data), .adc_valid(adc1_valid), .adc_ready(adc1_ready),
    .clk, .rst(cap_rst), .rd_en, .empty(empty1), .ch_data(ch1), .ch_valid(ch1_vld)
  );

  // ---------------- data pre-processing ----------------
  cplx8_t bb0, bb1;
  logic   bb0_vld, bb1_vld;

  preproc u_pre0 (
    .clk, .rst(cap_rst), .lo_step, .out_shift,
    .in_data(ch0), .in_valid(ch0_vld), .out_sample(bb0), .out_valid(bb0_vld)
  );
  preproc u_pre1 (
    .clk, .rst(cap_rst), .lo_step, .out_shift,
    .in_data(ch1), .in_valid(ch1_vld), .out_sample(bb1), .out_valid(bb1_vld)
  );

  // ---------------- high-speed Ethernet transmission ----------------
  logic [PKT_W-1:0] pg_data, fsm_data;
  logic             pg_valid, pg_ready, drop_pulse;
  logic             fsm_en, fsm_eof, eof_err;
  pkt_state_e       fsm_state;

  pkt_gen u_pkt_gen (
    .clk, .rst(pkt_rst), .pol0(bb0), .pol1(bb1), .in_valid(bb0_vld),
    .out_data(pg_data), .out_valid(pg_valid), .out_ready(pg_ready), .drop_pulse
  );

  pkt_fsm u_fsm (
    .clk, .rst(pkt_rst), .enable(sw_pkt_en), .user_data,
    .in_data(pg_data), .in_valid(pg_valid), .in_ready(pg_ready),
    .pkt_data(fsm_data), .en(fsm_en), .eof(fsm_eof), .state_o(fsm_state)
  );

  gbe_sync u_sync (
    .clk, .rst(pkt_rst), .pkt_data(fsm_data), .en(fsm_en), .eof(fsm_eof),
    .data_512(tx_data), .en_512(tx_valid), .eof_512(tx_eof), .eof_err
  );

  // ---------------- status ----------------
  logic [15:0] frames;
  always_ff @(posedge clk) begin
    if (pkt_rst) begin
      frames <= '0;
      drops  <= '0;
    end else begin
      if (tx_valid && tx_eof) frames <= frames + 1'b1;
      if (drop_pulse)         drops  <= drops + 1'b1;
    end
  end
  assign status = {frames, 8'd0, 3'd0, eof_err, 1'b0, fsm_state};

  // The two chains are read together, so they stay aligned.
  a_pol_aligned: assert property (@(posedge clk) disable iff (cap_rst)
                                  bb0_vld == bb1_vld);
  a_ch_aligned:  assert property (@(posedge clk) disable iff (cap_rst)
                                  ch0_vld == ch1_vld);
endmodule
