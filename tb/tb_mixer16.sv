// tb_mixer16: feeds random 16-channel vectors with a running vector index
// m and every LO setting, and compares each channel with
// round(x * 32767*exp(+j*2*pi*lo_step*(16m+k)/8) / 32768), the LO value
// worked out from the absolute sample index with real arithmetic. Output
// must appear one clock after the input.
module tb_mixer16;
  import bb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0] lo_step = 1;
  logic [NCH-1:0][SAMPLE_W-1:0] in_data, out_re, out_im;
  logic in_valid = 0, out_valid;

  mixer16 dut (.clk, .rst, .lo_step, .in_data, .in_valid, .out_re, .out_im, .out_valid);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  function automatic int exp_val(input int x, input int step, input int n, input bit im);
    real ang = 2.0 * PI * real'((step * n) % 8) / 8.0;
    int c = int'($rtoi((im ? $sin(ang) : $cos(ang)) * 32767.0 + (((im ? $sin(ang) : $cos(ang)) >= 0) ? 0.5 : -0.5)));
    longint p = longint'(x) * longint'(c) + 16384;
    return int'(p >>> 15);
  endfunction

  initial begin
    in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int st = 0; st < 8; st++) begin
      for (int m = 0; m < 40; m++) begin
        logic [NCH-1:0][SAMPLE_W-1:0] x;
        for (int k = 0; k < NCH; k++) x[k] = 16'($urandom);
        if (m == 0) for (int k = 0; k < NCH; k++) x[k] = (k % 2) ? 16'h8000 : 16'h7fff;
        lo_step  <= 3'(st);
        in_data  <= x;
        in_valid <= 1;
        @(posedge clk);
        in_valid <= 0;
        #1;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
        for (int k = 0; k < NCH; k++) begin
          int er, ei;
          er = exp_val(int'($signed(x[k])), st, 16*m + k, 0);
          ei = exp_val(int'($signed(x[k])), st, 16*m + k, 1);
          checks++;
          if (int'($signed(out_re[k])) != er || int'($signed(out_im[k])) != ei) begin
            failures++;
            if (failures < 10) $display("FAIL st=%0d k=%0d x=%0d got %0d,%0d exp %0d,%0d", st, k,
                                        $signed(x[k]), $signed(out_re[k]), $signed(out_im[k]), er, ei);
          end
        end
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid held"); end
      end
    end
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
