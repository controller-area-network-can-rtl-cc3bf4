// can_auth_pkg: constants and types shared by the phase-modulating CAN transceiver.
//
// The transceiver runs every digital block from one local 25 MHz clock whose period is one
// CAN time quantum (TQ, 40 ns). One CAN bit at 1 Mb/s lasts 25 TQ. A signature bit is carried
// by shifting the data edges of five consecutive CAN bits 3 TQ late (signature bit 1) or not
// at all (signature bit 0); the receiver calls an edge phase of 2 TQ or more a 1.
// The 25 TQ bit, the 3 TQ shift, the 1-in-5 rate, the 2 TQ threshold and the 8/16-bit
// signature follow the document. The first modulated bit (13, right after the 11-bit
// identifier and RTR bit of a base frame), the 13 TQ high time of the 1 MHz clocks and the
// seven recessive bits that close a frame are this design's choices.
`timescale 1ns / 1ps
package can_auth_pkg;

  localparam int unsigned TQ_PER_BIT         = 25;  // TQ in one 1 Mb/s bit (25 MHz / 1 MHz)
  localparam int unsigned TQW                = 5;   // width of a TQ index 0..24
  localparam int unsigned CLK_HIGH_TQ        = 13;  // high time of each 1 MHz phase clock
  localparam int unsigned MOD_DELAY_TQ       = 3;   // phase modulation constant (120 ns)
  localparam int unsigned BITS_PER_AUX       = 5;   // CAN bits per signature bit
  localparam int unsigned AUX_THRESHOLD_TQ   = 2;   // phase >= 2 TQ decodes as '1'
  localparam int unsigned SIG_MAX_BITS       = 16;  // longest signature
  localparam int unsigned SIG_SHORT_BITS     = 8;   // short signature
  localparam int unsigned MOD_START_BIT      = 13;  // first modulated bit, counted from SOF = 0
  localparam int unsigned EOF_RECESSIVE_BITS = 7;   // recessive run that ends a frame

  typedef logic [TQW-1:0]          tq_t;
  typedef logic [SIG_MAX_BITS-1:0] sig_t;

  typedef enum logic [1:0] {
    RX_IDLE     = 2'd0,   // bus idle, waiting for the start-of-frame edge
    RX_SOF_SYNC = 2'd1,   // SOF seen, clock selections being hard-synchronised
    RX_FRAME    = 2'd2    // inside a frame
  } rx_state_e;

endpackage
