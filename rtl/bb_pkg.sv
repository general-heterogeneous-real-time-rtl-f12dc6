// bb_pkg: constants and types shared by the baseband front-end.
//
// The front-end digitizes two polarizations at 2048 MSps, widens each ADC
// stream to 16 parallel phase channels, mixes and decimates by 16 to a
// 100 MHz wide complex baseband, and packs the result into 8192-byte frames
// of 1024 64-bit packets for a 512-bit 100GbE core. The numbers below follow
// that scheme; the sample widths after mixing and the requantized output
// width (8-bit real and imaginary parts, as in the frame layout) are fixed
// here so that all modules agree.
package bb_pkg;

  // ADC side: eight 16-bit samples per ADC-clock word (2048 MSps / 256 MHz).
  localparam int unsigned ADC_LANES = 8;
  localparam int unsigned SAMPLE_W  = 16;

  // Parallel channels after the capture FIFO (decimation factor D).
  localparam int unsigned NCH = 16;

  // Prototype low-pass filter: 672 taps, 42 per polyphase branch.
  localparam int unsigned NTAPS   = 672;
  localparam int unsigned COEF_W  = 18;
  // Coefficients are integers scaled by 2**COEF_FRAC (DC gain about 1).
  localparam int unsigned COEF_FRAC = 20;

  // Requantized baseband sample: 8-bit real, 8-bit imaginary.
  localparam int unsigned OUT_W = 8;

  // Framing.
  localparam int unsigned PKT_W       = 64;
  localparam int unsigned GBE_W       = 512;
  localparam int unsigned FRAME_PKTS  = 1024;
  localparam int unsigned HDR_PKTS    = 2;
  localparam int unsigned DATA_PKTS   = FRAME_PKTS - HDR_PKTS;  // 1022

  // Data packaging FSM states.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_F_HEAD = 3'd1,
    ST_WAIT   = 3'd2,
    ST_F_DATA = 3'd3,
    ST_E_DATA = 3'd4
  } pkt_state_e;

  // One requantized complex baseband sample.
  typedef struct packed {
    logic signed [OUT_W-1:0] re;
    logic signed [OUT_W-1:0] im;
  } cplx8_t;

endpackage
