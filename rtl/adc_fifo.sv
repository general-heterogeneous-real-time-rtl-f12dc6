// adc_fifo: dual-clock capture FIFO between an RF-ADC stream and the FPGA logic.
//
// The write side runs on the ADC stream clock and takes ADC_LANES 16-bit
// samples per word (eight samples per 256 MHz cycle at 2048 MSps). Two
// consecutive words are joined into one entry of 2*ADC_LANES samples, so the
// read side, on the FPGA clock, delivers 16 samples (256 bits) per read: the
// widening from 8x16 to 16x16 bits and the clock crossing are what the
// capture path needs. Sample j of a read word is the j-th oldest of those 16.
//
// Interface: the write side is a valid/ready stream (ready low only when a
// full entry cannot be stored), which is the control flow that keeps the
// FIFO from overrunning. The read side is a read-enable port with one cycle
// of latency: rd_valid rises the cycle after a read of a non-empty FIFO.
// Each side has its own synchronous active-high reset, which the caller must
// assert together (the top derives both from one request).
//
// Design choices not fixed by the source scheme: the depth (2**ADDR_W
// entries), gray-coded pointers with two-flop synchronizers, and the lower
// half of an entry holding the older ADC word.
module adc_fifo
  import bb_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  // ADC clock domain
  input  logic                                  wr_clk,
  input  logic                                  wr_rst,
  input  logic [ADC_LANES-1:0][SAMPLE_W-1:0]    wr_data,
  input  logic                                  wr_valid,
  output logic                                  wr_ready,
  // FPGA clock domain
  input  logic                                  rd_clk,
  input  logic                                  rd_rst,
  input  logic                                  rd_en,
  output logic [2*ADC_LANES-1:0][SAMPLE_W-1:0]  rd_data,
  output logic                                  rd_valid,
  output logic                                  empty
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [2*ADC_LANES-1:0][SAMPLE_W-1:0] mem [DEPTH];

  // ---------------- write side ----------------
  logic [ADC_LANES-1:0][SAMPLE_W-1:0] half_q;
  logic                               half_vld;
  logic [ADDR_W:0]                    wptr_bin, wptr_gray;
  logic [ADDR_W:0]                    rptr_gray_w1, rptr_gray_w2;
  logic [ADDR_W:0]                    rptr_bin, rptr_gray;
  logic [ADDR_W:0]                    wptr_gray_r1, wptr_gray_r2;
  logic                               full;
  logic                               push;

  assign full     = (wptr_gray == {~rptr_gray_w2[ADDR_W:ADDR_W-1], rptr_gray_w2[ADDR_W-2:0]});
  assign wr_ready = !(half_vld && full);
  assign push     = wr_valid && wr_ready && half_vld;

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      half_vld     <= 1'b0;
      half_q       <= '0;
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_w1 <= '0;
      rptr_gray_w2 <= '0;
    end else begin
      rptr_gray_w1 <= rptr_gray;
      rptr_gray_w2 <= rptr_gray_w1;
      if (wr_valid && wr_ready) begin
        if (!half_vld) begin
          half_q   <= wr_data;
          half_vld <= 1'b1;
        end else begin
          half_vld <= 1'b0;
        end
      end
      if (push) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= (wptr_bin + 1'b1) ^ ((wptr_bin + 1'b1) >> 1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (push) mem[wptr_bin[ADDR_W-1:0]] <= {wr_data, half_q};
  end

  // ---------------- read side ----------------
  logic            pop;

  assign empty = (rptr_gray == wptr_gray_r2);
  assign pop   = rd_en && !empty;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr_bin     <= '0;
      rptr_gray    <= '0;
      wptr_gray_r1 <= '0;
      wptr_gray_r2 <= '0;
      rd_valid     <= 1'b0;
      rd_data      <= '0;
    end else begin
      wptr_gray_r1 <= wptr_gray;
      wptr_gray_r2 <= wptr_gray_r1;
      rd_valid     <= pop;
      if (pop) begin
        rd_data   <= mem[rptr_bin[ADDR_W-1:0]];
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= (rptr_bin + 1'b1) ^ ((rptr_bin + 1'b1) >> 1);
      end
    end
  end

endmodule
