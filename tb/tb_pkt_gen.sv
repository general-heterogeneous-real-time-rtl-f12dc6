// tb_pkt_gen: random baseband samples for both polarizations go in at one
// sample per two clocks; a reference model builds the expected 64-bit
// packets (two time samples per packet, Pol0 re, Pol0 im, Pol1 re, Pol1 im,
// older sample in the upper half). The sink's ready is random, with one long
// stall that must make the generator drop data (drop_pulse): the model
// then discards what is left of the older word and keeps the newest one.
module tb_pkt_gen;
  import bb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  cplx8_t pol0, pol1;
  logic in_valid = 0;
  logic [PKT_W-1:0] out_data;
  logic out_valid, out_ready = 0, drop_pulse;

  pkt_gen dut (.clk, .rst, .pol0, .pol1, .in_valid, .out_data, .out_valid, .out_ready, .drop_pulse);

  int checks = 0, failures = 0;
  cplx8_t s0 [$], s1 [$];
  logic [PKT_W-1:0] expq [$];
  int words_made = 0, drops = 0, pkts = 0;
  bit stall = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid) begin
        s0.push_back(pol0);
        s1.push_back(pol1);
        if (s0.size() == 8) begin
          for (int s = 0; s < 4; s++)
            expq.push_back({s0[2*s], s1[2*s], s0[2*s+1], s1[2*s+1]});
          s0.delete(); s1.delete();
          words_made++;
        end
      end
      if (drop_pulse) begin
        drops++;
        // the older word's unsent packets are gone; the newest word stays
        while (expq.size() > 4) void'(expq.pop_front());
      end
      if (out_valid && out_ready) begin
        logic [PKT_W-1:0] e;
        checks++;
        e = expq.pop_front();
        if (out_data != e) begin
          failures++;
          if (failures < 10) $display("FAIL pkt %0d: %h exp %h", pkts, out_data, e);
        end
        pkts++;
      end
      out_ready <= !stall && ($urandom_range(0, 4) != 0);
    end
  end

  initial begin
    pol0 = '0; pol1 = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1600; i++) begin
      if (i == 600) stall = 1;
      if (i == 700) stall = 0;
      pol0 <= cplx8_t'($urandom);
      pol1 <= cplx8_t'($urandom);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (drops == 0) begin failures++; $display("FAIL: no drop during stall"); end
    checks++;
    if (expq.size() != 0 || pkts > 4 * (words_made - drops) + 3 * drops || pkts < 4 * (words_made - drops)) begin
      failures++; $display("FAIL: %0d packets for %0d words, %0d drops", pkts, words_made, drops);
    end
    $display("words=%0d drops=%0d packets=%0d", words_made, drops, pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
