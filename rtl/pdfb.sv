// pdfb: polyphase decimation filter bank with the coefficient-sharing
// ("reusable") structure, decimating a complex stream by 16.
//
// The prototype is an even-symmetric linear-phase low-pass FIR with NTAPS
// taps h(n) = h(NTAPS-1-n) (672 taps: pass band 0-50 MHz at fs = 2048 MHz).
// Split into D = 16 branches of Q = NTAPS/D taps, branch i has coefficients
// g_i(q) = h(q*D + i). Symmetry gives g_i(q) = g_{D-1-i}(Q-1-q), so branches
// i and D-1-i share all coefficients. Each hardware row r therefore stores
// only the first half, h_r(0..Q/2-1) = h(q*D + r), which is exactly the
// first half h(0..NTAPS/2-1) of the prototype, and owns two delay lines:
//
//   * the signal line: its own channel's newest Q/2 samples entering from
//     the signal end; the oldest one leaves at the feedback end and is
//     handed to the partner row D-1-r;
//   * the feedback line: the partner's samples of delays Q/2..Q-1, running
//     in the opposite direction.
//
// Tap n of row r multiplies h_r(n) by (signal[n] + feedback[Q/2-1-n]), a
// pre-add before one multiplier, so the bank needs NTAPS/2 multipliers per
// real rail instead of NTAPS. Summing all rows gives
//   y[m] = sum_{n=0}^{NTAPS-1} h(n) * x[16m + 15 - n],
// one output for every 16 inputs, where x[16m+k] is channel k of vector m.
// Row r filters channel D-1-r. Real and imaginary rails are filtered alike.
//
// Coefficients: COEF_W-bit integers equal to h(n)*2**20, read from COEF_FILE
// (NTAPS/2 hex lines, h(0) first). The values come from a Parks-McClellan
// equiripple design (pass 0-50 MHz, stop from 58 MHz, stop band weight 20);
// the exact edges and weights are this design's choice, only the order, the
// 100 MHz bandwidth and the equiripple type are the source scheme's.
//
// Timing: one input vector may be accepted every clock. out_valid follows
// the in_valid that completes vector m by 5 clocks (line shift, pre-add,
// multiply, row sum, row total). Output is full precision, ACC_W bits.
module pdfb
  import bb_pkg::*;
#(
  parameter int unsigned NTAPS_P   = NTAPS,
  parameter string       COEF_FILE = "rtl/pdfb_coeffs.hex",
  parameter int unsigned IN_W      = SAMPLE_W,
  // Pre-add (IN_W+1) x coefficient, plus growth for Q/2 taps and D rows.
  parameter int unsigned ACC_W     = IN_W + 1 + COEF_W + $clog2(NTAPS_P/NCH/2) + $clog2(NCH)
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [NCH-1:0][IN_W-1:0]        in_re,
  input  logic [NCH-1:0][IN_W-1:0]        in_im,
  input  logic                            in_valid,
  output logic signed [ACC_W-1:0]         out_re,
  output logic signed [ACC_W-1:0]         out_im,
  output logic                            out_valid
);
  localparam int unsigned D  = NCH;
  localparam int unsigned Q  = NTAPS_P / D;
  localparam int unsigned QH = Q / 2;
  localparam int unsigned PW = IN_W + 1 + COEF_W;        // product width
  localparam int unsigned RW = PW + $clog2(QH);          // row-sum width

  // First half of the prototype, h(0..NTAPS/2-1).
  logic signed [COEF_W-1:0] coef [NTAPS_P/2];
  initial $readmemh(COEF_FILE, coef);

  // Delay lines, [row][tap], one set per rail.
  logic signed [IN_W-1:0] sig_re [D][QH];
  logic signed [IN_W-1:0] sig_im [D][QH];
  logic signed [IN_W-1:0] fb_re  [D][QH];
  logic signed [IN_W-1:0] fb_im  [D][QH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < D; r++)
        for (int j = 0; j < QH; j++) begin
          sig_re[r][j] <= '0; sig_im[r][j] <= '0;
          fb_re[r][j]  <= '0; fb_im[r][j]  <= '0;
        end
    end else if (in_valid) begin
      for (int r = 0; r < D; r++) begin
        sig_re[r][0] <= in_re[D-1-r];
        sig_im[r][0] <= in_im[D-1-r];
        // Feedback input: the partner row's oldest signal-line sample.
        fb_re[r][0]  <= sig_re[D-1-r][QH-1];
        fb_im[r][0]  <= sig_im[D-1-r][QH-1];
        for (int j = 1; j < QH; j++) begin
          sig_re[r][j] <= sig_re[r][j-1];
          sig_im[r][j] <= sig_im[r][j-1];
          fb_re[r][j]  <= fb_re[r][j-1];
          fb_im[r][j]  <= fb_im[r][j-1];
        end
      end
    end
  end

  // Pipeline: pre-add, multiply, row sum, total.
  logic signed [IN_W:0]   pre_re  [D][QH];
  logic signed [IN_W:0]   pre_im  [D][QH];
  logic signed [PW-1:0]   prod_re [D][QH];
  logic signed [PW-1:0]   prod_im [D][QH];
  logic signed [RW-1:0]   row_re  [D];
  logic signed [RW-1:0]   row_im  [D];
  logic [3:0]             vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      vld       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int r = 0; r < D; r++) begin
        row_re[r] <= '0; row_im[r] <= '0;
        for (int j = 0; j < QH; j++) begin
          pre_re[r][j]  <= '0; pre_im[r][j]  <= '0;
          prod_re[r][j] <= '0; prod_im[r][j] <= '0;
        end
      end
    end else begin
      vld <= {vld[2:0], in_valid};
      for (int r = 0; r < D; r++) begin
        for (int j = 0; j < QH; j++) begin
          pre_re[r][j]  <= (IN_W+1)'(sig_re[r][j]) + (IN_W+1)'(fb_re[r][QH-1-j]);
          pre_im[r][j]  <= (IN_W+1)'(sig_im[r][j]) + (IN_W+1)'(fb_im[r][QH-1-j]);
          prod_re[r][j] <= PW'(pre_re[r][j]) * PW'(coef[j*D + r]);
          prod_im[r][j] <= PW'(pre_im[r][j]) * PW'(coef[j*D + r]);
        end
      end
      for (int r = 0; r < D; r++) begin
        logic signed [RW-1:0] acc_re, acc_im;
        acc_re = '0;
        acc_im = '0;
        for (int j = 0; j < QH; j++) begin
          acc_re += RW'(prod_re[r][j]);
          acc_im += RW'(prod_im[r][j]);
        end
        row_re[r] <= acc_re;
        row_im[r] <= acc_im;
      end
      out_valid <= vld[3];
      if (vld[3]) begin
        logic signed [ACC_W-1:0] tot_re, tot_im;
        tot_re = '0;
        tot_im = '0;
        for (int r = 0; r < D; r++) begin
          tot_re += ACC_W'(row_re[r]);
          tot_im += ACC_W'(row_im[r]);
        end
        out_re <= tot_re;
        out_im <= tot_im;
      end
    end
  end

  initial begin
    assert (NTAPS_P % (2 * D) == 0)
      else $fatal(1, "pdfb: NTAPS_P must be a multiple of 2*NCH");
  end
endmodule
