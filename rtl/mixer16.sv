// mixer16: parallel digital down-conversion of the 16 phase channels.
//
// Channel k holds ADC samples n = 16m + k. Each channel multiplies its real
// sample by its own local-oscillator value exp(+j*2*pi*f_lo*n/fs). The LO
// frequency is f_lo = lo_step * fs/8 (lo_step = 1 gives 256 MHz at
// fs = 2048 MHz, the centre of the 206-306 MHz band that is kept). Because
// 16*lo_step*m is a multiple of 8, the LO phase of channel k does not change
// with m: it is the eighth-turn index p = (lo_step*k) mod 8, so each channel
// needs only one complex coefficient taken from an eight-entry table, and
// no phase accumulator is required.
//
// The positive-exponent LO makes the mixed band appear inverted: an input
// at 231 MHz lands at +25 MHz, 306 MHz at -50 MHz and 206 MHz at +50 MHz.
//
// Arithmetic: 16-bit signed sample times a Q1.15 LO value, rounded half up
// and truncated back to 16 bits (no overflow is possible with the table
// below). Timing: one register stage; out_valid follows in_valid by one
// clock. lo_step is a run-time setting from a software register. Restricting
// the LO to multiples of fs/8 is this design's choice; the scheme itself
// uses only 256 MHz.
module mixer16
  import bb_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst,
  input  logic [2:0]                          lo_step,
  input  logic [NCH-1:0][SAMPLE_W-1:0]        in_data,
  input  logic                                in_valid,
  output logic [NCH-1:0][SAMPLE_W-1:0]        out_re,
  output logic [NCH-1:0][SAMPLE_W-1:0]        out_im,
  output logic                                out_valid
);
  // cos and sin of p*pi/4 in Q1.15.
  function automatic logic signed [15:0] lo_cos(input logic [2:0] p);
    case (p)
      3'd0: return 16'sd32767;
      3'd1: return 16'sd23170;
      3'd2: return 16'sd0;
      3'd3: return -16'sd23170;
      3'd4: return -16'sd32767;
      3'd5: return -16'sd23170;
      3'd6: return 16'sd0;
      default: return 16'sd23170;
    endcase
  endfunction

  function automatic logic signed [15:0] lo_sin(input logic [2:0] p);
    return lo_cos(p - 3'd2);
  endfunction

  function automatic logic signed [SAMPLE_W-1:0] mul_round(
      input logic signed [SAMPLE_W-1:0] x, input logic signed [15:0] c);
    logic signed [SAMPLE_W+16-1:0] prod;
    prod = x * c + (1 <<< 14);
    return prod[SAMPLE_W+15-1:15];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < NCH; k++) begin
          logic [2:0] p;
          p = 3'(lo_step * 3'(k));
          out_re[k] <= mul_round(in_data[k], lo_cos(p));
          out_im[k] <= mul_round(in_data[k], lo_sin(p));
        end
      end
    end
  end
endmodule
