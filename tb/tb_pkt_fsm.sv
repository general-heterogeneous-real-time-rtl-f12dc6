// tb_pkt_fsm: drives the packaging FSM with a counting 64-bit data stream
// of random availability and checks every frame: two header packets
// {user, n} with consecutive n, then 1022 data packets in order, EN only on
// those 1024 packets, EOF alone on the clock right after the last one, and
// the next frame's header straight after. Checks that nothing leaves IDLE
// before enable, that WAIT, F_DATA and E_DATA are all visited, and that a
// reset in mid-frame returns to IDLE.
module tb_pkt_fsm;
  import bb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic enable = 0;
  logic [3:0] user_data = 4'hA;
  logic [PKT_W-1:0] in_data = 0, pkt_data;
  logic in_valid = 0, in_ready, en, eof;
  pkt_state_e state_o;

  pkt_fsm dut (.clk, .rst, .enable, .user_data, .in_data, .in_valid, .in_ready,
               .pkt_data, .en, .eof, .state_o);

  int checks = 0, failures = 0;
  int pos = 0;                 // packet position in the current frame
  logic [PKT_W-1:0] next_data = 0;
  logic [59:0] next_hdr = 0;
  int frames = 0, n_wait = 0, n_fdata = 0, n_edata = 0;
  bit last_was_final = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // source: counting data, random valid
  always @(posedge clk) begin
    if (in_valid && in_ready) in_data <= in_data + 1;
    in_valid <= ($urandom_range(0, 3) != 0);
  end

  // frame checker
  always @(posedge clk) begin
    if (!rst && enable) begin
      if (state_o == ST_WAIT)   n_wait++;
      if (state_o == ST_F_DATA) n_fdata++;
      if (state_o == ST_E_DATA) n_edata++;
      if (eof) begin
        checks++;
        if (en || !last_was_final) fail("EOF not alone right after the last packet");
        frames++;
        pos = 0;
      end
      last_was_final = 0;
      if (en) begin
        checks++;
        if (pos < 2) begin
          if (pkt_data != {user_data, next_hdr}) fail($sformatf("header %h exp %h", pkt_data, {user_data, next_hdr}));
          next_hdr++;
        end else begin
          if (pkt_data != next_data) fail($sformatf("data %0d exp %0d", pkt_data, next_data));
          next_data++;
        end
        if (pos >= 1024) fail("frame longer than 1024 packets");
        pos++;
        last_was_final = (pos == 1024);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (state_o != ST_IDLE || en) fail("left IDLE without enable");
    enable <= 1;
    wait (frames == 3);
    repeat (5) @(posedge clk);
    checks++;
    if (n_wait == 0 || n_fdata == 0 || n_edata != 3) fail("state coverage");
    // mid-frame reset
    repeat (300) @(posedge clk);
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    enable <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (state_o != ST_IDLE || en || eof) fail("reset did not return to IDLE");
    $display("frames=%0d wait=%0d f_data=%0d e_data=%0d", frames, n_wait, n_fdata, n_edata);
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
