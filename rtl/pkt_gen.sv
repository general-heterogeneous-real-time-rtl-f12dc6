// pkt_gen: packet data generation for the Ethernet transmission path.
//
// Each polarization's baseband stream (one 8+8-bit complex sample per
// valid) goes through an 8-deep SIPO that gathers eight consecutive
// samples, Pol*_0 (oldest) to Pol*_7. The data combination then interleaves
// the two polarizations into one 256-bit word, most significant first:
//   {P0_0.re, P0_0.im, P1_0.re, P1_0.im, P0_1.re, ..., P1_7.im}
// The slice logic cuts it into four 64-bit slices and the multiplexer sends
// them most significant first, so every 64-bit packet holds two consecutive
// time samples of both polarizations, real and imaginary parts in separate
// bytes.
//
// Interface: the two polarizations must arrive with the same valid (they are
// read from their FIFOs together). The 64-bit output is a valid/ready
// stream to the packaging FSM. The multiplexer holds one 256-bit word; if a
// new word is completed while slices of the previous one are still waiting,
// the new word replaces them and drop_pulse is raised for one clock (this
// is what happens while the packaging FSM is idle). Keeping the newest word
// means that when framing starts the packets are contiguous from the first. At the default rates a word
// is completed every 16 clocks and needs 4, so only the FSM's header and
// end-of-frame cycles ever hold the multiplexer back.
//
// Timing: the first slice of a word is offered the clock after the eighth
// sample is taken. The drop policy and bit order inside the 256-bit word are
// this design's choices; the layout of a packet follows the frame format.
module pkt_gen
  import bb_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  cplx8_t             pol0,
  input  cplx8_t             pol1,
  input  logic               in_valid,
  output logic [PKT_W-1:0]   out_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic               drop_pulse
);
  localparam int unsigned NS = 8;                       // samples per SIPO
  localparam int unsigned WW = 2 * NS * $bits(cplx8_t);  // 256
  localparam int unsigned NSLICE = WW / PKT_W;           // 4

  cplx8_t     sipo0 [NS];
  cplx8_t     sipo1 [NS];
  logic [2:0] scnt;
  logic       word_done;

  // Data combination of the completed SIPO contents.
  logic [WW-1:0] comb_word;
  always_comb begin
    for (int t = 0; t < NS; t++)
      comb_word[WW-1-32*t -: 32] = {sipo0[t], sipo1[t]};
  end

  logic [WW-1:0]             hold;
  logic [$clog2(NSLICE):0]   left;     // slices still to send
  logic [$clog2(NSLICE)-1:0] sidx;     // next slice to send

  assign out_valid = (left != 0);
  assign out_data  = hold[WW-1-PKT_W*sidx -: PKT_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      scnt       <= '0;
      word_done  <= 1'b0;
      hold       <= '0;
      left       <= '0;
      sidx       <= '0;
      drop_pulse <= 1'b0;
      for (int t = 0; t < NS; t++) begin
        sipo0[t] <= '0;
        sipo1[t] <= '0;
      end
    end else begin
      word_done  <= 1'b0;
      drop_pulse <= 1'b0;
      if (in_valid) begin
        sipo0[scnt] <= pol0;
        sipo1[scnt] <= pol1;
        scnt        <= scnt + 1'b1;
        word_done   <= (scnt == 3'(NS-1));
      end
      if (out_valid && out_ready) begin
        left <= left - 1'b1;
        sidx <= sidx + 1'b1;
      end
      if (word_done) begin
        // The newest word always wins; unsent slices of the older one are
        // discarded, so the stream restarts without a gap.
        hold <= comb_word;
        left <= ($clog2(NSLICE)+1)'(NSLICE);
        sidx <= '0;
        if (out_valid && !(out_ready && left == 1)) drop_pulse <= 1'b1;
      end
    end
  end
endmodule
