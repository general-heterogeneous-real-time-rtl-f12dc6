// tb_pdfb: checks the polyphase decimation filter bank against a direct
// 672-tap convolution y[m] = sum_n h(n) x[16m+15-n], with h(n) rebuilt from
// its stored half by symmetry. Random complex vectors are fed with random
// gaps; the latency from the completing in_valid to out_valid must be 5
// clocks.
module tb_pdfb;
  import bb_pkg::*;

  localparam int unsigned ACC_W = SAMPLE_W + 1 + COEF_W + $clog2(NTAPS/NCH/2) + $clog2(NCH);
  localparam int NVEC = 120;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NCH-1:0][SAMPLE_W-1:0] in_re, in_im;
  logic in_valid = 0;
  logic signed [ACC_W-1:0] out_re, out_im;
  logic out_valid;

  pdfb dut (.clk, .rst, .in_re, .in_im, .in_valid, .out_re, .out_im, .out_valid);

  int checks = 0, failures = 0;
  logic signed [COEF_W-1:0] half [NTAPS/2];
  longint h [NTAPS];
  longint xr [NVEC*NCH], xi [NVEC*NCH];
  int outs = 0;
  int vec_sent = 0;
  longint t_in [NVEC];
  longint cyc = 0;

  int nin = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid) begin t_in[nin] = cyc; nin++; end
  end

  function automatic longint ref_y(input int m, input bit im);
    longint acc = 0;
    for (int n = 0; n < NTAPS; n++) begin
      int idx = 16*m + 15 - n;
      if (idx >= 0) acc += h[n] * (im ? xi[idx] : xr[idx]);
    end
    return acc;
  endfunction

  initial begin
    $readmemh("rtl/pdfb_coeffs.hex", half);
    for (int n = 0; n < NTAPS/2; n++) begin
      h[n] = longint'(half[n]);
      h[NTAPS-1-n] = longint'(half[n]);
    end
    for (int i = 0; i < NVEC*NCH; i++) begin
      xr[i] = longint'($signed(16'($urandom)));
      xi[i] = longint'($signed(16'($urandom)));
      if (i < 16) begin xr[i] = 32767; xi[i] = -32768; end  // extremes
    end
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int m = 0; m < NVEC; m++) begin
      while ($urandom_range(0, 2) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      for (int k = 0; k < NCH; k++) begin
        in_re[k] <= 16'(xr[16*m+k]);
        in_im[k] <= 16'(xi[16*m+k]);
      end
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (outs != NVEC) begin
      failures++;
      $display("FAIL: %0d outputs for %0d vectors", outs, NVEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      longint er, ei;
      er = ref_y(outs, 0);
      ei = ref_y(outs, 1);
      checks += 3;
      if (longint'(out_re) != er || longint'(out_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d got %0d,%0d exp %0d,%0d", outs, out_re, out_im, er, ei);
      end
      // out_valid is sampled 5 clocks after the input vector was sampled
      if (cyc - t_in[outs] != 5) begin
        failures++;
        if (failures < 10) $display("FAIL latency m=%0d: %0d", outs, cyc - t_in[outs]);
      end
      if (out_re == 0 && out_im == 0) failures++;  // random data never sums to zero
      outs++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
