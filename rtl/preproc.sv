// preproc: pre-processing module for one polarization.
//
// Sixteen DSP sub-channels, each a mixer followed by one polyphase branch:
// mixer16 shifts the band centred on the LO (256 MHz by default) to zero,
// pdfb low-pass filters it to 100 MHz and decimates by 16, summing the
// branches into one complex baseband sample per input vector (128 MSps).
// requant then rounds and clips each rail to 8 bits with a run-time shift.
//
// Interface: in_data/in_valid come from pol_channel (channel k = sample
// 16m+k). out_sample is one 8-bit complex sample (struct cplx8_t) with
// out_valid. Timing: out_valid follows in_valid by 7 clocks (mixer 1,
// filter 5, requantizer register 1). lo_step and out_shift are software
// settings; the default shift of 28 maps a full-scale 16-bit tone to about
// half of the 8-bit range (filter DC gain 2**20).
module preproc
  import bb_pkg::*;
#(
  parameter int unsigned NTAPS_P   = NTAPS,
  parameter string       COEF_FILE = "rtl/pdfb_coeffs.hex"
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [2:0]                    lo_step,
  input  logic [5:0]                    out_shift,
  input  logic [NCH-1:0][SAMPLE_W-1:0]  in_data,
  input  logic                          in_valid,
  output cplx8_t                        out_sample,
  output logic                          out_valid
);
  localparam int unsigned ACC_W =
      SAMPLE_W + 1 + COEF_W + $clog2(NTAPS_P/NCH/2) + $clog2(NCH);

  logic [NCH-1:0][SAMPLE_W-1:0] mix_re, mix_im;
  logic                         mix_vld;
  logic signed [ACC_W-1:0]      f_re, f_im;
  logic                         f_vld;
  logic signed [OUT_W-1:0]      q_re, q_im;

  mixer16 u_mix (
    .clk, .rst, .lo_step,
    .in_data, .in_valid,
    .out_re(mix_re), .out_im(mix_im), .out_valid(mix_vld)
  );

  pdfb #(.NTAPS_P(NTAPS_P), .COEF_FILE(COEF_FILE), .IN_W(SAMPLE_W), .ACC_W(ACC_W)) u_pdfb (
    .clk, .rst,
    .in_re(mix_re), .in_im(mix_im), .in_valid(mix_vld),
    .out_re(f_re), .out_im(f_im), .out_valid(f_vld)
  );

  requant #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_q_re (.in_val(f_re), .shift(out_shift), .out_val(q_re));
  requant #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_q_im (.in_val(f_im), .shift(out_shift), .out_val(q_im));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= f_vld;
      if (f_vld) out_sample <= '{re: q_re, im: q_im};
    end
  end
endmodule
