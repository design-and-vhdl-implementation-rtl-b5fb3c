// hdlc_pkg: constants and types shared by the HDLC controller.
//
// The flag 01111110 and the rule of zero insertion after five ones are the
// standard HDLC ones. The two frame check polynomials are CRC-16
// (x^16+x^15+x^2+1, 0x8005) and CRC-32 (0x04C11DB7). Both are used as a
// plain polynomial division: the message is taken most significant bit
// first, the remainder starts at zero and is neither reflected nor inverted.
// These are the only settings that reproduce the remainders of the reference
// waveforms. The control register holds five bits. Bits 2 (16-bit address)
// and 4 (CRC-32) follow the reference control values 00011, 00111 and 10011.
// The meaning of bits 0 and 1 is this design's own choice.
package hdlc_pkg;

  localparam logic [7:0]  FLAG    = 8'b0111_1110;
  localparam logic [15:0] POLY16  = 16'h8005;
  localparam logic [31:0] POLY32  = 32'h04C1_1DB7;

  // Control register, bit 4 down to bit 0.
  typedef struct packed {
    logic crc32;   // 1: CRC-32 frame check sequence, 0: CRC-16
    logic rsvd;    // unused, reads back as written
    logic addr16;  // 1: 16-bit address (hi and lo byte), 0: 8-bit (lo byte)
    logic proto;   // 1: HDLC protocol mode (FCS appended and checked), 0: transparent
    logic en;      // transmitter: send a frame on write; receiver: enable
  } ctrl_t;

  // Receiver status register.
  typedef struct packed {
    logic addr_match; // address of the last good frame equals the station address
    logic aborted;      // seven or more ones seen inside a frame
    logic len_err;    // frame length does not match the configured format
    logic crc_err;    // remainder of the division was not zero, frame discarded
    logic frame_ok;   // a frame was received without error
  } rx_status_t;

endpackage
