// tb_gbe_sync: writes counting 64-bit packets with random gaps, 1024 per
// frame with EOF on the clock after the last packet, as the packaging FSM
// does. Every 512-bit word must hold the next eight packets (first packet
// in the top bits) and appear two clocks after the EN of its eighth packet;
// EOF_512 must mark exactly the 128th word of each frame. A final stray EOF
// off a word boundary must set eof_err.
module tb_gbe_sync;
  import bb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [PKT_W-1:0] pkt_data = 0;
  logic en = 0, eof = 0;
  logic [GBE_W-1:0] data_512;
  logic en_512, eof_512, eof_err;

  gbe_sync dut (.clk, .rst, .pkt_data, .en, .eof, .data_512, .en_512, .eof_512, .eof_err);

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t8 [$];             // clock of each word's eighth packet
  logic [PKT_W-1:0] next_pkt = 0;
  int words = 0, eofs = 0, sent = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      // outputs are not defined until reset has been applied
    end else if (en) begin
      sent++;
      if (sent % 8 == 0) t8.push_back(cyc);
    end
    if (rst) begin
    end else if (en_512) begin
      longint t;
      checks += 3;
      t = t8.pop_front();
      if (cyc - t != 2) begin failures++; $display("FAIL: word %0d latency %0d", words, cyc - t); end
      for (int p = 0; p < 8; p++)
        if (data_512[GBE_W-1-64*p -: 64] != next_pkt + 64'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d slot %0d = %0d", words, p, data_512[GBE_W-1-64*p -: 64]);
        end
      next_pkt += 8;
      words++;
      if (eof_512 != (words % 128 == 0)) begin failures++; $display("FAIL: eof_512 on word %0d", words); end
      if (eof_512) eofs++;
    end else if (eof_512) begin
      checks++; failures++; $display("FAIL: eof_512 without en_512");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 3; f++) begin
      for (int p = 0; p < 1024; p++) begin
        while ($urandom_range(0, 3) == 0) begin en <= 0; @(posedge clk); end
        en <= 1;
        pkt_data <= 64'(f * 1024 + p);
        @(posedge clk);
      end
      en <= 0; eof <= 1;
      @(posedge clk);
      eof <= 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks += 2;
    if (eofs != 3 || words != 384) begin failures++; $display("FAIL: %0d words, %0d eofs", words, eofs); end
    if (eof_err) begin failures++; $display("FAIL: eof_err on aligned frames"); end
    // stray EOF after three packets
    for (int p = 0; p < 3; p++) begin en <= 1; pkt_data <= 64'(9999); @(posedge clk); end
    en <= 0; eof <= 1;
    @(posedge clk);
    eof <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (!eof_err) begin failures++; $display("FAIL: misplaced EOF not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
