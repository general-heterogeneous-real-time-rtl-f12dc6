// pkt_fsm: data packaging state machine that builds Ethernet frames.
//
// A frame is FRAME_PKTS = 1024 64-bit packets (8192 bytes): two header
// packets followed by 1022 data packets. States:
//   IDLE   after reset; leaves for F_HEAD when enable is set.
//   F_HEAD two clocks, one header packet each. A header packet is the 4-bit
//          user field in bits 63:60 above bits 59:0 of a counter that counts
//          only in this state, so consecutive headers carry consecutive
//          numbers and a receiver can detect lost frames.
//   WAIT   no data packet available; waits.
//   F_DATA outputs the data packet accepted in the previous clock.
//   E_DATA entered after the 1022nd data packet has been output; raises
//          EOF for one clock, then returns to F_HEAD for the next frame.
// A synchronous reset returns every state to IDLE.
//
// Outputs (registered): pkt_data, en (high in F_HEAD and F_DATA) and eof
// (high in E_DATA, the clock after the last packet of the frame; the
// 512-bit synchronization logic attaches it to the word holding that last
// packet). The input side is a valid/ready stream: the FSM takes a data
// packet in WAIT or F_DATA while fewer than 1022 have been taken this
// frame.
//
// From the source scheme: the five state names, the 2 + 1022 packet frame,
// the user field width, a counter running only in F_HEAD, EN in F_HEAD and
// F_DATA, EOF from E_DATA, and return to F_HEAD. This design's choices: the
// header bit layout, the enable input, the exact order of transitions
// (F_HEAD -> WAIT, WAIT <-> F_DATA driven by data availability).
module pkt_fsm
  import bb_pkg::*;
#(
  parameter int unsigned DATA_PKTS_P = DATA_PKTS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [3:0]       user_data,
  input  logic [PKT_W-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [PKT_W-1:0] pkt_data,
  output logic             en,
  output logic             eof,
  output pkt_state_e       state_o
);
  localparam int unsigned CW = $clog2(DATA_PKTS_P + 1);

  pkt_state_e       state, state_n;
  logic [CW-1:0]    taken;      // data packets taken this frame
  logic             hidx;       // header packet index in F_HEAD
  logic [59:0]      hdr_cnt;    // runs only in F_HEAD
  logic             take;

  assign in_ready = (state == ST_WAIT || state == ST_F_DATA) && (taken < CW'(DATA_PKTS_P));
  assign take     = in_valid && in_ready;
  assign state_o  = state;

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:   if (enable) state_n = ST_F_HEAD;
      ST_F_HEAD: if (hidx)   state_n = ST_WAIT;
      ST_WAIT, ST_F_DATA: begin
        if (take)                           state_n = ST_F_DATA;
        else if (taken == CW'(DATA_PKTS_P)) state_n = ST_E_DATA;
        else                                state_n = ST_WAIT;
      end
      ST_E_DATA: state_n = ST_F_HEAD;
      default:   state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_IDLE;
      taken    <= '0;
      hidx     <= 1'b0;
      hdr_cnt  <= '0;
      pkt_data <= '0;
      en       <= 1'b0;
      eof      <= 1'b0;
    end else begin
      state <= state_n;
      en    <= (state_n == ST_F_HEAD) || (state_n == ST_F_DATA);
      eof   <= (state_n == ST_E_DATA);
      if (state_n == ST_F_HEAD) begin
        pkt_data <= {user_data, hdr_cnt};
        hdr_cnt  <= hdr_cnt + 1'b1;
      end else if (take) begin
        pkt_data <= in_data;
      end
      if (state == ST_F_HEAD) hidx <= ~hidx;
      if (state_n == ST_F_HEAD) taken <= '0;
      else if (take)            taken <= taken + 1'b1;
    end
  end

  // EN and EOF are never raised together.
  a_en_eof: assert property (@(posedge clk) disable iff (rst) !(en && eof));
endmodule
