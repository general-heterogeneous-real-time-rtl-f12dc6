// tb_rfsoc_frontend: end-to-end test of the front-end at its default sizes
// (672-tap filter, 1024-packet frames, 512-bit output).
//
// Two ADC streams are generated here, eight samples per ADC clock: a tone
// at 231 MHz on polarization 0 and at 281 MHz on polarization 1. The ADC
// clock and the FPGA clock are unrelated (4.0 ns and 3.9 ns). Software
// writes go through the AXI4-Lite port. Sequence:
//   1. FIFO reading off: the capture FIFOs fill and push back (ADC ready
//      low) -- the stall mechanism.
//   2. Reading on, packetizer off: baseband words are dropped by the packet
//      generator -- the drop mechanism, seen in the DROPS register.
//   3. Packetizer on: frames are collected from the 512-bit port until
//      NFRAMES have ended with EOF.
// Each frame must be 128 words (1024 packets) with EOF only on the last,
// two headers {user, n} with consecutive n, and 1022 data packets. The
// samples decoded from the data packets must be tones at +25 MHz (pol 0)
// and -25 MHz (pol 1) of the 128 MSps baseband -- the inverted band -- with
// the filter's pass-band amplitude, and every pair of consecutive samples,
// across packets and frames, must show that phase step: a lost or repeated
// sample anywhere breaks it. The FSM's WAIT, F_DATA and E_DATA states must
// all have been used. Finally STATUS must show the frame count and no EOF
// alignment error. Then software resets the packetizer: the FSM must sit
// in IDLE, the frame count must clear, and after re-enabling the next frame
// must start again with header number 0 and an unbroken sample stream.
module tb_rfsoc_frontend;
  import bb_pkg::*;

  localparam int NFRAMES = 3;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 28000.0;

  logic adc_clk = 0, clk = 0, rst = 1;
  always #2.0 adc_clk = ~adc_clk;
  always #1.95 clk = ~clk;

  logic [ADC_LANES-1:0][SAMPLE_W-1:0] adc0_data, adc1_data;
  logic adc0_valid = 0, adc1_valid = 0, adc0_ready, adc1_ready;
  logic [4:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = 0;
  logic [3:0] s_wstrb = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic [GBE_W-1:0] tx_data;
  logic tx_valid, tx_eof;
  logic [31:0] tx_dest_ip;
  logic [15:0] tx_dest_port;

  rfsoc_frontend dut (.*);

  int checks = 0, failures = 0;
  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---------------- ADC stream model ----------------
  longint n0 = 0;   // index of the first sample of the current ADC word
  function automatic logic [15:0] tone(input real f, input longint n);
    real v = AMP * $cos(2.0 * PI * f / 2048.0 * real'(n));
    return 16'($rtoi(v + ((v >= 0) ? 0.5 : -0.5)));
  endfunction
  int stall_cycles = 0;
  always @(posedge adc_clk) begin
    if (!rst) begin
      if (adc0_valid && !adc0_ready) stall_cycles++;
      n0 = n0 + longint'(ADC_LANES);       // the ADC never waits: a refused word is lost
      adc0_valid <= 1;
      adc1_valid <= 1;
      for (int i = 0; i < ADC_LANES; i++) begin
        adc0_data[i] <= tone(231.0, n0 + longint'(i));
        adc1_data[i] <= tone(281.0, n0 + longint'(i));
      end
    end
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_wr(input logic [4:0] a, input logic [31:0] d);
    @(posedge clk);
    s_awaddr <= a; s_wdata <= d; s_wstrb <= 4'hF; s_awvalid <= 1; s_wvalid <= 1; s_bready <= 1;
    do @(posedge clk); while (!s_awready);
    s_awvalid <= 0; s_wvalid <= 0;
    do @(posedge clk); while (!s_bvalid);
    s_bready <= 0;
  endtask
  task automatic axi_rd(input logic [4:0] a, output logic [31:0] d);
    @(posedge clk);
    s_araddr <= a; s_arvalid <= 1; s_rready <= 1;
    do @(posedge clk); while (!s_arready);
    s_arvalid <= 0;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    s_rready <= 0;
  endtask

  // ---------------- frame receiver ----------------
  int frames = 0, words_in_frame = 0;
  logic [59:0] next_hdr;
  bit have_hdr = 0;
  real prev_re [2], prev_im [2];
  bit have_prev = 0;
  int samples = 0, cont_bad = 0;
  real mag_sum [2];
  real dph_re [2], dph_im [2];
  localparam real DPH = 2.0 * PI * 25.0 / 128.0;

  task automatic take_sample(input int pol, input cplx8_t s);
    real re = real'(s.re), im = real'(s.im);
    if (have_prev) begin
      real cr = re * prev_re[pol] + im * prev_im[pol];
      real ci = im * prev_re[pol] - re * prev_im[pol];
      real d = $atan2(ci, cr);
      real e = (pol == 0) ? DPH : -DPH;
      dph_re[pol] += cr;
      dph_im[pol] += ci;
      if (d < e - 0.25 || d > e + 0.25) cont_bad++;
    end
    mag_sum[pol] += $sqrt(re * re + im * im);
    prev_re[pol] = re;
    prev_im[pol] = im;
  endtask

  always @(posedge clk) begin
    if (rst) begin
      // outputs are not defined until reset has been applied
    end else if (tx_valid) begin
      for (int p = 0; p < 8; p++) begin
        logic [63:0] pk;
        int idx;
        pk = tx_data[GBE_W-1-64*p -: 64];
        idx = words_in_frame * 8 + p;
        if (idx < 2) begin
          checks++;
          if (pk[63:60] != 4'h9) fail($sformatf("header user field %h", pk[63:60]));
          if (have_hdr && pk[59:0] != next_hdr) fail($sformatf("header count %0d exp %0d", pk[59:0], next_hdr));
          next_hdr = pk[59:0] + 1;
          have_hdr = 1;
        end else begin
          // two time samples: {P0(t), P1(t), P0(t+1), P1(t+1)}
          take_sample(0, pk[63:48]);
          take_sample(1, pk[47:32]);
          have_prev = 1;
          take_sample(0, pk[31:16]);
          take_sample(1, pk[15:0]);
          samples += 2;
        end
      end
      words_in_frame++;
      checks++;
      if (tx_eof != (words_in_frame == 128)) fail($sformatf("EOF on word %0d", words_in_frame));
      if (tx_eof) begin
        frames++;
        words_in_frame = 0;
      end
    end else if (tx_eof) begin
      checks++;
      fail("EOF without valid");
    end
  end

  // FSM state coverage (hierarchical peek, for the mechanism count only)
  int n_wait = 0, n_fdata = 0, n_edata = 0, n_fhead = 0;
  always @(posedge clk) begin
    if (!rst) case (dut.fsm_state)
      ST_WAIT:   n_wait++;
      ST_F_DATA: n_fdata++;
      ST_E_DATA: n_edata++;
      ST_F_HEAD: n_fhead++;
      default: ;
    endcase
  end

  initial begin
    logic [31:0] d, drops;
    real hsum, expmag;
    logic signed [COEF_W-1:0] half [NTAPS/2];
    $readmemh("rtl/pdfb_coeffs.hex", half);
    hsum = 0;
    for (int n = 0; n < NTAPS/2; n++) hsum += 2.0 * real'(half[n]);
    for (int p = 0; p < 2; p++) begin
      mag_sum[p] = 0.0; dph_re[p] = 0.0; dph_im[p] = 0.0;
    end
    adc0_data = '0; adc1_data = '0;

    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    axi_wr(5'h0C, 32'h9);             // user field
    axi_wr(5'h10, 32'h0A00_0002);     // destination IP
    axi_wr(5'h14, 32'd10000);         // destination port
    repeat (100) @(posedge clk);      // FIFOs fill: ADC is pushed back
    axi_wr(5'h00, 32'h2);             // FIFO read on
    repeat (400) @(posedge clk);      // filters settle, packet words dropped
    axi_rd(5'h1C, drops);
    checks++;
    if (drops == 0) fail("no drops while the packetizer was off");
    axi_wr(5'h00, 32'h6);             // packetizer on
    wait (frames == NFRAMES);
    repeat (10) @(posedge clk);
    axi_rd(5'h18, d);

    // ---------------- results ----------------
    checks++;
    if (d[31:16] != 16'(NFRAMES)) fail($sformatf("STATUS frames %0d", d[31:16]));
    checks++;
    if (d[4]) fail("EOF alignment error");
    checks++;
    if (tx_dest_ip != 32'h0A00_0002 || tx_dest_port != 16'd10000) fail("IP/port");
    checks++;
    if (samples != NFRAMES * 1022 * 2) fail($sformatf("%0d samples", samples));
    checks++;
    if (cont_bad != 0) fail($sformatf("%0d sample pairs break the tone phase step", cont_bad));
    expmag = AMP / 2.0 * hsum / real'(64'd1 << 28);
    for (int p = 0; p < 2; p++) begin
      real m, ph;
      m  = mag_sum[p] / real'(samples);
      ph = $atan2(dph_im[p], dph_re[p]);
      $display("pol%0d: phase step %f rad, magnitude %f (exp %f)", p, ph, m, expmag);
      checks += 2;
      if (m < 0.9 * expmag || m > 1.1 * expmag) fail("tone amplitude");
      if ((p == 0 && (ph < DPH - 0.02 || ph > DPH + 0.02)) ||
          (p == 1 && (ph > -DPH + 0.02 || ph < -DPH - 0.02))) fail("tone frequency");
    end
    $display("mechanisms: adc_stall=%0d drops=%0d f_head=%0d wait=%0d f_data=%0d e_data=%0d frames=%0d",
             stall_cycles, drops, n_fhead, n_wait, n_fdata, n_edata, frames);
    checks += 5;
    if (stall_cycles == 0) fail("FIFO push-back never happened");
    if (n_fhead == 0) fail("F_HEAD never used");
    if (n_wait == 0)  fail("WAIT never used");
    if (n_fdata == 0) fail("F_DATA never used");
    if (n_edata != NFRAMES) fail("E_DATA count");

    // ---------------- packetizer reset and restart ----------------
    axi_wr(5'h00, 32'hE);             // pkt_rst held: everything to IDLE
    repeat (20) @(posedge clk);
    axi_rd(5'h18, d);
    checks += 2;
    if (d[31:16] != 0) fail("frame count not cleared by the packetizer reset");
    if (d[2:0] != 3'(ST_IDLE)) fail("FSM not in IDLE during reset");
    words_in_frame = 0;               // the cut frame is abandoned
    have_prev = 0;                    // the sample stream restarts
    next_hdr = 0;                     // header numbering restarts
    axi_wr(5'h00, 32'h6);
    wait (frames == NFRAMES + 1);
    repeat (10) @(posedge clk);
    checks++;
    if (cont_bad != 0) fail("samples lost after the restart");
    $display("after restart: frames=%0d, header count resumed at %0d", frames, next_hdr);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
