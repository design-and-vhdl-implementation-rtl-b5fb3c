// bit_destuffer: HDLC receive deframer with flag detection and zero deletion.
//
// Line bits enter an 8-bit window. A window equal to the flag 01111110 marks
// a frame boundary: it closes the frame being received and opens the next one.
// A bit becomes a frame bit only when it leaves a full window without having
// been part of a flag, so flag bits are never delivered. The delay is 8 line
// bits. On the delivered stream a 0 that follows five consecutive ones is
// the zero the transmitter inserted, and it is deleted. Seven consecutive
// ones on the line abort the frame. The deframer then hunts for the next flag
// and delivers nothing until it sees one. Flag, zero deletion and abort are
// standard HDLC. The window construction is this design's own choice.
//
// Interface: `bit_en` is the line bit clock enable and samples `rxd`. The
// outputs are single-cycle pulses in an enabled cycle:
//   dvalid/dbit  one frame bit, in line order
//   flag         a flag was completed (frame boundary)
//   aborted      seven ones inside a frame
// When a flag closes a frame, the frame's last bit and the flag can be
// signalled in the same cycle; the bit belongs to the frame that is closing.
module bit_destuffer
  import hdlc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic bit_en,
  input  logic rxd,
  output logic dvalid,
  output logic dbit,
  output logic flag,
  output logic aborted,
  output logic deleted
);

  logic [7:0] win;
  logic [7:0] nwin;
  logic [3:0] vcnt;     // number of valid bits in the window, up to 8
  logic [2:0] ones;     // consecutive ones among delivered bits
  logic       hunting;  // waiting for a flag after reset or abort
  logic       leave;    // a window bit leaves and is frame content

  assign nwin    = {win[6:0], rxd};
  assign leave   = bit_en && !hunting && (vcnt == 4'd8);
  assign dbit    = win[7];
  assign deleted = leave && (ones == 3'd5) && !win[7];
  assign dvalid  = leave && !deleted;
  assign flag    = bit_en && (nwin == FLAG);
  assign aborted   = bit_en && !hunting && !flag && (nwin[6:0] == 7'h7F);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      win     <= '0;
      vcnt    <= '0;
      ones    <= '0;
      hunting <= 1'b1;
    end else if (bit_en) begin
      win <= nwin;
      if (vcnt != 4'd8) vcnt <= vcnt + 4'd1;
      if (leave) begin
        if (deleted || !win[7]) ones <= '0;
        else if (ones != 3'd7)  ones <= ones + 3'd1;
      end
      if (flag) begin
        hunting <= 1'b0;
        vcnt    <= '0;
        ones    <= '0;
      end else if (nwin[6:0] == 7'h7F) begin
        hunting <= 1'b1;
        vcnt    <= '0;
        ones    <= '0;
      end
    end
  end

endmodule
