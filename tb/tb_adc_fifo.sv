// tb_adc_fifo: writes a counting sample sequence on one clock, reads on an
// unrelated clock with random read enables and pauses, and checks that each
// 16-sample read word continues the sequence, that the FIFO fills (ready
// low) during a long read pause, that reads of an empty FIFO return nothing
// and that rd_valid follows a read by one clock.
module tb_adc_fifo;
  import bb_pkg::*;

  logic wclk = 0, rclk = 0;
  always #2 wclk = ~wclk;
  always #3.1 rclk = ~rclk;

  logic wr_rst = 1, rd_rst = 1;
  logic [ADC_LANES-1:0][SAMPLE_W-1:0] wr_data;
  logic wr_valid = 0, wr_ready;
  logic rd_en = 0;
  logic [2*ADC_LANES-1:0][SAMPLE_W-1:0] rd_data;
  logic rd_valid, empty;

  adc_fifo dut (.wr_clk(wclk), .wr_rst, .wr_data, .wr_valid, .wr_ready,
                .rd_clk(rclk), .rd_rst, .rd_en, .rd_data, .rd_valid, .empty);

  int checks = 0, failures = 0;
  logic [15:0] wseq = 0, rseq = 0;
  int full_seen = 0, words = 0;
  bit pause = 0;
  logic prev_pop = 0;

  // writer: counting samples, random valid
  always @(posedge wclk) begin
    if (wr_rst) begin
      wr_valid <= 0;
    end else begin
      if (wr_valid && wr_ready) wseq = wseq + 16'(ADC_LANES);
      if (wr_valid && !wr_ready) full_seen++;
      wr_valid <= ($urandom_range(0, 3) != 0);
      for (int i = 0; i < ADC_LANES; i++) wr_data[i] <= wseq + 16'(i);
    end
  end
  // keep data consistent with wseq when valid is held
  // (data is recomputed every edge from the current wseq)

  always @(posedge rclk) begin
    if (!rd_rst) begin
      checks++;
      if (rd_valid != prev_pop) begin
        failures++;
        $display("FAIL: rd_valid %0b after pop %0b", rd_valid, prev_pop);
      end
      if (rd_valid) begin
        for (int k = 0; k < 2*ADC_LANES; k++) begin
          checks++;
          if (rd_data[k] != rseq + 16'(k)) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d lane %0d: %0d exp %0d", words, k, rd_data[k], rseq + 16'(k));
          end
        end
        rseq = rseq + 16'(2*ADC_LANES);
        words++;
      end
      prev_pop = rd_en && !empty;
      rd_en <= !pause && ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    wr_rst = 0; rd_rst = 0;
    repeat (300) @(posedge rclk);
    pause = 1;                      // let it fill
    repeat (200) @(posedge rclk);
    pause = 0;
    repeat (600) @(posedge rclk);
    pause = 1;                      // drain: writer stopped below
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: FIFO never full"); end
    checks++;
    if (words < 100) begin failures++; $display("FAIL: only %0d words", words); end
    $display("words=%0d full_cycles=%0d", words, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
