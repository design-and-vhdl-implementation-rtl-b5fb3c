// crc_lfsr: bit-serial CRC-16 / CRC-32 divider.
//
// Each accepted bit shifts the remainder register one place, like one step of
// a long division by the generator polynomial, most significant bit first.
// After the message bits have been fed, `crc` holds M(x)*x^W mod P(x).
// W is 16 or 32 and is selected by `sel32`. At the transmitter this is the
// frame check sequence that is appended to the message. At the receiver the
// whole frame (message followed by its check sequence) is fed through the
// same divider; the remainder is zero exactly when the frame is a multiple of
// P(x), i.e. when it arrived without a detectable error.
//
// Interface: `clear` zeroes the remainder (it wins over `bit_en`).
// `bit_en` accepts `bit_in` on the rising clock edge. The result is valid the
// cycle after the last bit. In CRC-16 mode the upper 16 bits of `crc` are 0.
// One bit per clock; no latency beyond the register.
module crc_lfsr
  import hdlc_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        clear,
  input  logic        sel32,
  input  logic        bit_en,
  input  logic        bit_in,
  output logic [31:0] crc,
  output logic        zero
);

  logic [31:0] nxt;
  logic        fb;

  always_comb begin
    if (sel32) begin
      fb  = crc[31] ^ bit_in;
      nxt = {crc[30:0], 1'b0} ^ (fb ? POLY32 : 32'h0);
    end else begin
      fb  = crc[15] ^ bit_in;
      nxt = {16'h0, crc[14:0], 1'b0} ^ (fb ? {16'h0, POLY16} : 32'h0);
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       crc <= '0;
    else if (clear)   crc <= '0;
    else if (bit_en)  crc <= nxt;
  end

  assign zero = (crc == '0);

endmodule
