// tb_pol_channel: sends a counting sample stream at the ADC rate (eight
// samples per ADC clock) and reads with a free-running read enable. Channel
// k of every output vector must carry sample 16m+k, ch_valid must follow an
// accepted read by two clocks, and the vector rate must be half the ADC
// word rate when both clocks are equal.
module tb_pol_channel;
  import bb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic adc_clk;
  assign adc_clk = clk;   // same 256 MHz source, as in the reference setup

  logic rst = 1, adc_rst = 1;
  logic [ADC_LANES-1:0][SAMPLE_W-1:0] adc_data;
  logic adc_valid = 0, adc_ready;
  logic rd_en = 0, empty;
  logic [NCH-1:0][SAMPLE_W-1:0] ch_data;
  logic ch_valid;

  pol_channel dut (.adc_clk, .adc_rst, .adc_data, .adc_valid, .adc_ready,
                   .clk, .rst, .rd_en, .empty, .ch_data, .ch_valid);

  int checks = 0, failures = 0;
  logic [15:0] seq = 0, exp_seq = 0;
  int vecs = 0, adc_words = 0;
  logic [1:0] pop_d = 0;

  always @(posedge clk) begin
    if (!adc_rst) begin
      if (adc_valid && adc_ready) begin seq = seq + 16'(ADC_LANES); adc_words++; end
      adc_valid <= 1;
      for (int i = 0; i < ADC_LANES; i++) adc_data[i] <= seq + 16'(i);
    end
    if (!rst) begin
      checks++;
      if (ch_valid != pop_d[1]) begin failures++; $display("FAIL: ch_valid timing"); end
      if (ch_valid) begin
        for (int k = 0; k < NCH; k++) begin
          checks++;
          if (ch_data[k] != exp_seq + 16'(k)) begin
            failures++;
            if (failures < 10) $display("FAIL vec %0d ch %0d: %0d exp %0d", vecs, k, ch_data[k], exp_seq + 16'(k));
          end
        end
        exp_seq = exp_seq + 16'(NCH);
        vecs++;
      end
      pop_d = {pop_d[0], rd_en && !empty};
      rd_en <= 1;
    end
  end

  initial begin
    adc_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0; adc_rst <= 0;
    repeat (1000) @(posedge clk);
    checks++;
    // 2 ADC words per vector; allow a few words in flight
    if (vecs < adc_words / 2 - 8 || vecs > adc_words / 2) begin
      failures++;
      $display("FAIL: %0d vectors for %0d ADC words", vecs, adc_words);
    end
    checks++;
    if (vecs < 400) begin failures++; $display("FAIL: rate %0d", vecs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
