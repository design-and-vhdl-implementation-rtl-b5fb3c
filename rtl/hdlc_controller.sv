// hdlc_controller: HDLC controller with a transmitter and a receiver.
//
// The transmitter turns a host-written data word and an 8- or 16-bit address
// into a frame {data, address, FCS}. The FCS is CRC-16 or CRC-32. The frame
// is sent serially between 01111110 flags with zero insertion. The receiver
// does the reverse. It finds the flags, deletes the inserted zeros, divides
// the frame by the same polynomial and presents data and address when the
// remainder is zero. The two halves have their own control registers and
// share nothing but the clock and reset, so the controller works full duplex.
// With `loopback` set the receiver listens to the transmitter's own line and
// uses its bit clock enable, as in the reference set-up in which the receiver
// checks the transmitter's output.
//
// Bit timing comes from the physical layer. `tx_bit_en` and `rx_bit_en` are
// one-cycle enables, one per line bit, at most one per clock. Reset is
// asynchronous and active high.
module hdlc_controller
  import hdlc_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned HALF_W = ADDR_W / 2
) (
  input  logic              clk,
  input  logic              reset,
  // transmitter host registers
  input  logic [DATA_W-1:0] datain,
  input  logic [HALF_W-1:0] txaddressin1,
  input  logic [HALF_W-1:0] txaddressin2,
  input  logic              wrtaddrlo,
  input  logic              wrtaddrhi,
  input  logic              wrtctrl,
  input  ctrl_t             txctrlin,
  output logic [ADDR_W-1:0] txaddressout,
  output ctrl_t             txctrlreg,
  output logic [31:0]       crc1,
  output logic              tx_busy,
  output logic              tx_done,
  // receiver host registers
  input  logic              wrxctrl,
  input  ctrl_t             rxctrlin,
  input  logic [HALF_W-1:0] rxaddressin1,
  input  logic [HALF_W-1:0] rxaddressin2,
  input  logic              wrxaddrlo,
  input  logic              wrxaddrhi,
  input  logic              wrxstatus,
  output ctrl_t             rxctrlreg,
  output logic [DATA_W-1:0] rxdataout,
  output logic [ADDR_W-1:0] rxaddressout,
  output logic              rx_valid,
  output rx_status_t        rxstatus,
  output logic [31:0]       crc2,
  // line
  input  logic              loopback,
  input  logic              tx_bit_en,
  input  logic              rx_bit_en,
  output logic              txd,
  input  logic              rxd,
  output logic              tx_in_frame,
  output logic              tx_stuffed,
  output logic              rx_deleted
);

  logic rx_line, rx_en;

  assign rx_line = loopback ? txd : rxd;
  assign rx_en   = loopback ? tx_bit_en : rx_bit_en;

  hdlc_tx #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u1 (
    .clk          (clk),
    .reset        (reset),
    .datain       (datain),
    .txaddressin1 (txaddressin1),
    .txaddressin2 (txaddressin2),
    .wrtaddrlo    (wrtaddrlo),
    .wrtaddrhi    (wrtaddrhi),
    .wrtctrl      (wrtctrl),
    .txctrlin     (txctrlin),
    .txaddressout (txaddressout),
    .txctrlreg    (txctrlreg),
    .crc1         (crc1),
    .tx_busy      (tx_busy),
    .tx_done      (tx_done),
    .tx_bit_en    (tx_bit_en),
    .txd          (txd),
    .tx_in_frame  (tx_in_frame),
    .tx_stuffed   (tx_stuffed)
  );

  hdlc_rx #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u2 (
    .clk          (clk),
    .reset        (reset),
    .wrxctrl      (wrxctrl),
    .rxctrlin     (rxctrlin),
    .rxaddressin1 (rxaddressin1),
    .rxaddressin2 (rxaddressin2),
    .wrxaddrlo    (wrxaddrlo),
    .wrxaddrhi    (wrxaddrhi),
    .wrxstatus    (wrxstatus),
    .ctrlreg1     (rxctrlreg),
    .rxdataout    (rxdataout),
    .rxaddressout (rxaddressout),
    .rx_valid     (rx_valid),
    .statreg      (rxstatus),
    .crc2         (crc2),
    .rx_bit_en    (rx_en),
    .rxd          (rx_line),
    .rx_deleted   (rx_deleted)
  );

endmodule
