// gbe_sync: 64-to-512-bit packet RAM and EN/EOF synchronization logic in
// front of a 512-bit 100GbE transmit port.
//
// Packets written with en go into a two-bank RAM, eight 64-bit entries per
// bank. When a bank holds eight packets it is read as one 512-bit word
// (packet 0 in bits 511:448, packet 7 in bits 63:0) while the other bank
// fills, so eight packets leave together. The control flow is delayed to
// match: en_512 is raised with each 512-bit word, and eof_512 is raised with
// the word that holds the frame's last packet. The packaging FSM gives EOF
// one clock after the last packet's EN, which is exactly the clock in which
// that word is read out, so the two meet without extra storage. An EOF that
// does not fall on a word boundary cannot be placed and sets eof_err
// (sticky until reset); with 1024-packet frames that does not happen.
//
// Timing: data_512/en_512/eof_512 are registered and appear two clocks after
// the EN of the eighth packet of a word. Packets must not come faster than
// one per clock, which the FSM guarantees. The bank count, the bit order in
// the 512-bit word and the error flag are this design's choices.
module gbe_sync
  import bb_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [PKT_W-1:0] pkt_data,
  input  logic             en,
  input  logic             eof,
  output logic [GBE_W-1:0] data_512,
  output logic             en_512,
  output logic             eof_512,
  output logic             eof_err
);
  localparam int unsigned NP = GBE_W / PKT_W;   // 8 packets per word

  logic [PKT_W-1:0] ram [2][NP];
  logic             wbank;
  logic [2:0]       widx;
  logic             word_rdy;   // a bank was completed last clock
  logic             rbank;

  always_ff @(posedge clk) begin
    if (en) ram[wbank][widx] <= pkt_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank    <= 1'b0;
      widx     <= '0;
      word_rdy <= 1'b0;
      rbank    <= 1'b0;
      data_512 <= '0;
      en_512   <= 1'b0;
      eof_512  <= 1'b0;
      eof_err  <= 1'b0;
    end else begin
      word_rdy <= 1'b0;
      if (en) begin
        widx <= widx + 1'b1;
        if (widx == 3'(NP-1)) begin
          wbank    <= ~wbank;
          rbank    <= wbank;
          word_rdy <= 1'b1;
        end
      end
      en_512  <= word_rdy;
      eof_512 <= word_rdy && eof;
      if (word_rdy) begin
        for (int p = 0; p < NP; p++)
          data_512[GBE_W-1-PKT_W*p -: PKT_W] <= ram[rbank][p];
      end
      if (eof && !word_rdy) eof_err <= 1'b1;
    end
  end
endmodule
