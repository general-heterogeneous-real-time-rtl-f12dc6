// pol_channel: parallel data generation for one polarization.
//
// The capture FIFO (adc_fifo) turns the ADC's eight-samples-per-cycle
// stream into 256-bit words of 16 consecutive samples on the FPGA clock.
// The serial-in-parallel-out (SIPO) stage then slices each word into its 16
// samples and presents sample k on channel k, so channel k carries samples
// 16m+k of the 2048 MSps stream: each channel runs at 1/16 of the ADC rate
// (128 MSps). The SIPO is a register stage: all 16 channels update together
// and ch_valid marks the cycle, which keeps the strict time order between
// channels that the polyphase filter relies on.
//
// Timing: ch_valid follows rd_en (with the FIFO not empty) by two FPGA
// clock cycles. Reading is started by the caller; reading both
// polarizations with the same enable keeps them aligned.
module pol_channel
  import bb_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4
) (
  input  logic                               adc_clk,
  input  logic                               adc_rst,
  input  logic [ADC_LANES-1:0][SAMPLE_W-1:0] adc_data,
  input  logic                               adc_valid,
  output logic                               adc_ready,
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               rd_en,
  output logic                               empty,
  output logic [NCH-1:0][SAMPLE_W-1:0]       ch_data,
  output logic                               ch_valid
);
  logic [2*ADC_LANES-1:0][SAMPLE_W-1:0] fifo_q;
  logic                                 fifo_vld;

  adc_fifo #(.ADDR_W(FIFO_ADDR_W)) u_fifo (
    .wr_clk  (adc_clk),
    .wr_rst  (adc_rst),
    .wr_data (adc_data),
    .wr_valid(adc_valid),
    .wr_ready(adc_ready),
    .rd_clk  (clk),
    .rd_rst  (rst),
    .rd_en   (rd_en),
    .rd_data (fifo_q),
    .rd_valid(fifo_vld),
    .empty   (empty)
  );

  // 16-channel SIPO: slice the 256-bit word into channel registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      ch_valid <= 1'b0;
      ch_data  <= '0;
    end else begin
      ch_valid <= fifo_vld;
      if (fifo_vld) begin
        for (int k = 0; k < NCH; k++) ch_data[k] <= fifo_q[k];
      end
    end
  end

  initial begin
    assert (2 * ADC_LANES == NCH)
      else $fatal(1, "pol_channel: FIFO output must hold one sample per channel");
  end
endmodule
