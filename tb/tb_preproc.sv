// tb_preproc: tone tests of one polarization's mixer + decimating filter.
// A 231 MHz tone sampled at 2048 MSps must come out as a complex tone at
// +25 MHz of the 128 MSps baseband (phase advancing by 2*pi*25/128 per
// sample, i.e. the band is inverted) with the filter's pass-band gain; a
// 400 MHz tone, outside the 206-306 MHz band, must be suppressed. With the
// LO set to 512 MHz a 487 MHz tone must land at +25 MHz, and with a small
// output shift the 8-bit output must clip instead of wrapping. Also checks
// the 7-clock latency from input vector to output sample.
module tb_preproc;
  import bb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] lo_step = 3'd1;
  logic [5:0] out_shift = 6'd28;
  logic [NCH-1:0][SAMPLE_W-1:0] in_data;
  logic in_valid = 0;
  cplx8_t out_sample;
  logic out_valid;

  preproc dut (.clk, .rst, .lo_step, .out_shift, .in_data, .in_valid, .out_sample, .out_valid);

  localparam real PI = 3.14159265358979;
  localparam real AMP = 28000.0;
  localparam int NV = 300;
  localparam int SETTLE = 60;   // > 42 vectors of filter memory

  int checks = 0, failures = 0;
  logic signed [COEF_W-1:0] half [NTAPS/2];
  real hsum;
  int nout;
  real ore [NV], oim [NV];
  longint cyc = 0, t_in = -1, lat = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && t_in < 0) t_in = cyc;
    if (!rst && out_valid) begin
      if (lat < 0) lat = cyc - t_in;
      if (nout < NV) begin
        ore[nout] = real'(out_sample.re);
        oim[nout] = real'(out_sample.im);
      end
      nout++;
    end
  end

  task automatic run_tone(input real f_mhz);
    nout = 0;
    t_in = -1;
    lat = -1;
    for (int m = 0; m < NV; m++) begin
      for (int k = 0; k < NCH; k++) begin
        real ph = 2.0 * PI * f_mhz / 2048.0 * real'(16*m + k);
        in_data[k] <= 16'($rtoi(AMP * $cos(ph) + (($cos(ph) >= 0) ? 0.5 : -0.5)));
      end
      in_valid <= 1;
      @(posedge clk);
      if (m % 3 == 2) begin in_valid <= 0; @(posedge clk); end
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    real pr, pi_, mag, dphi, expmag, worst;
    $readmemh("rtl/pdfb_coeffs.hex", half);
    hsum = 0;
    for (int n = 0; n < NTAPS/2; n++) hsum += 2.0 * real'(half[n]);
    in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // ---- in-band tone ----
    run_tone(231.0);
    checks++;
    if (nout != NV) begin failures++; $display("FAIL: %0d outputs", nout); end
    checks++;
    if (lat != 7) begin failures++; $display("FAIL: latency %0d", lat); end
    pr = 0; pi_ = 0; mag = 0;
    for (int m = SETTLE + 1; m < NV; m++) begin
      // y[m] * conj(y[m-1])
      pr  += ore[m]*ore[m-1] + oim[m]*oim[m-1];
      pi_ += oim[m]*ore[m-1] - ore[m]*oim[m-1];
      mag += $sqrt(ore[m]*ore[m] + oim[m]*oim[m]);
    end
    mag = mag / real'(NV - SETTLE - 1);
    dphi = $atan2(pi_, pr);
    expmag = AMP / 2.0 * hsum / real'(64'd1 << 28);
    $display("231 MHz: phase step %f rad (exp %f), magnitude %f (exp %f)",
             dphi, 2.0*PI*25.0/128.0, mag, expmag);
    checks++;
    if (dphi < 2.0*PI*25.0/128.0 - 0.03 || dphi > 2.0*PI*25.0/128.0 + 0.03) begin
      failures++; $display("FAIL: tone not at +25 MHz");
    end
    checks++;
    if (mag < 0.9 * expmag || mag > 1.1 * expmag) begin
      failures++; $display("FAIL: pass-band gain");
    end

    // ---- out-of-band tone ----
    run_tone(400.0);
    worst = 0;
    for (int m = SETTLE; m < NV; m++) begin
      real a;
      a = $sqrt(ore[m]*ore[m] + oim[m]*oim[m]);
      if (a > worst) worst = a;
    end
    $display("400 MHz: worst magnitude %f", worst);
    checks++;
    if (worst > 1.5) begin failures++; $display("FAIL: stop band"); end

    // ---- LO moved to 2*fs/8 = 512 MHz: 487 MHz must land at +25 MHz ----
    lo_step <= 3'd2;
    run_tone(487.0);
    pr = 0; pi_ = 0;
    for (int m = SETTLE + 1; m < NV; m++) begin
      pr  += ore[m]*ore[m-1] + oim[m]*oim[m-1];
      pi_ += oim[m]*ore[m-1] - ore[m]*oim[m-1];
    end
    dphi = $atan2(pi_, pr);
    $display("LO 512 MHz, 487 MHz tone: phase step %f rad", dphi);
    checks++;
    if (dphi < 2.0*PI*25.0/128.0 - 0.03 || dphi > 2.0*PI*25.0/128.0 + 0.03) begin
      failures++; $display("FAIL: LO setting not applied");
    end

    // ---- small shift: output must clip at +127 / -128, never wrap ----
    lo_step <= 3'd1;
    out_shift <= 6'd22;               // about 64x the previous level
    run_tone(231.0);
    begin
      int n_hi, n_lo, n_mid;
      n_hi = 0; n_lo = 0; n_mid = 0;
      for (int m = SETTLE; m < NV; m++) begin
        if (ore[m] == 127.0) n_hi++;
        if (ore[m] == -128.0) n_lo++;
        if (ore[m] > -100.0 && ore[m] < 100.0) n_mid++;
      end
      $display("clipping: %0d at +127, %0d at -128, %0d small", n_hi, n_lo, n_mid);
      checks += 2;
      if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL: no clipping"); end
      // a 64x overdriven sine sits in the clipped region most of the time
      if (n_mid > (NV - SETTLE) / 4) begin failures++; $display("FAIL: wrapped values"); end
    end

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
