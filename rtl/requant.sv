// requant: scale a wide signed value down to OUT_W bits.
//
// out = saturate(round(in / 2**shift)), with rounding half up (add
// 2**(shift-1), then arithmetic shift right) and clipping to the signed
// OUT_W-bit range. shift = 0 passes the value through (then clipped).
// Purely combinational; the caller registers the result. The 8-bit result
// width matches the frame layout; the run-time shift is this design's way
// of setting the level.
module requant #(
  parameter int unsigned IN_W  = 44,
  parameter int unsigned OUT_W = 8
) (
  input  logic signed [IN_W-1:0]  in_val,
  input  logic [5:0]              shift,
  output logic signed [OUT_W-1:0] out_val
);
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((1 << (OUT_W-1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(1 << (OUT_W-1));

  logic signed [IN_W:0] rnd;
  logic signed [IN_W:0] shifted;

  always_comb begin
    rnd = (IN_W+1)'(in_val);
    if (shift != 0) rnd = rnd + ((IN_W+1)'(1) <<< (shift - 6'd1));
    shifted = rnd >>> shift;
    if (shifted > MAXV)      out_val = MAXV[OUT_W-1:0];
    else if (shifted < MINV) out_val = MINV[OUT_W-1:0];
    else                     out_val = shifted[OUT_W-1:0];
  end
endmodule
