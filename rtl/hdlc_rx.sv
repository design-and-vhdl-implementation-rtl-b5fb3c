// hdlc_rx: HDLC receiver.
//
// The bit destuffer strips flags and inserted zeros from the line. Every frame
// bit is shifted into a frame register and, at the same time, into a CRC
// divider that uses the same polynomial as the transmitter. When the closing
// flag arrives the frame is judged one cycle later, after the divider has
// taken the last bit. The length must match the configured format: DATA_W
// data bits, ADDR_W or ADDR_W/2 address bits and 16 or 32 FCS bits. In
// protocol mode the remainder must also be zero. A good frame updates
// `rxdataout` and `rxaddressout` (the address right aligned, upper half zero
// for an 8-bit address) and pulses `rx_valid`. An errored frame is discarded
// and only sets a status bit. In transparent mode the FCS field is absent
// and nothing is checked but the length. That the receiver divides the whole
// frame and accepts a zero remainder, and that it discards errored frames,
// is taken from the source design. The status register, the station address
// compare and the transparent-mode behaviour are this design's own choices.
//
// Host side: wrxctrl loads the control register (same layout as the
// transmitter's; bit en enables reception). wrxaddrlo and wrxaddrhi load the
// station address halves. wrxstatus clears the status register. Status bits
// are sticky until cleared, except addr_match, which describes the last good
// frame.
module hdlc_rx
  import hdlc_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned HALF_W  = ADDR_W / 2,
  localparam int unsigned FRAME_W = DATA_W + ADDR_W + 32,
  localparam int unsigned CNT_W   = $clog2(FRAME_W + 2)
) (
  input  logic              clk,
  input  logic              reset,
  // host side
  input  logic              wrxctrl,
  input  ctrl_t             rxctrlin,
  input  logic [HALF_W-1:0] rxaddressin1,   // low half of the station address
  input  logic [HALF_W-1:0] rxaddressin2,   // high half of the station address
  input  logic              wrxaddrlo,
  input  logic              wrxaddrhi,
  input  logic              wrxstatus,
  output ctrl_t             ctrlreg1,
  output logic [DATA_W-1:0] rxdataout,
  output logic [ADDR_W-1:0] rxaddressout,
  output logic              rx_valid,
  output rx_status_t        statreg,
  output logic [31:0]       crc2,           // remainder over the last frame
  // line side
  input  logic              rx_bit_en,
  input  logic              rxd,
  output logic              rx_deleted
);

  logic [ADDR_W-1:0]  station;
  logic [FRAME_W-1:0] reg6;       // received frame bits, last bit at bit 0
  logic [CNT_W-1:0]   count;      // saturates at FRAME_W + 1
  logic               dvalid, dbit, flag, aborted;
  logic               judge;      // the frame closed in the previous cycle
  logic               crc_zero;
  logic [31:0]        crc;

  bit_destuffer u_destuff (
    .clk     (clk),
    .reset   (reset),
    .bit_en  (rx_bit_en),
    .rxd     (rxd),
    .dvalid  (dvalid),
    .dbit    (dbit),
    .flag    (flag),
    .aborted   (aborted),
    .deleted (rx_deleted)
  );

  crc_lfsr u_crc (
    .clk    (clk),
    .reset  (reset),
    .clear  (judge || aborted),
    .sel32  (ctrlreg1.crc32),
    .bit_en (dvalid),
    .bit_in (dbit),
    .crc    (crc),
    .zero   (crc_zero)
  );

  // Format expected by the control register.
  logic [CNT_W-1:0] fcs_bits, addr_bits, exp_len;
  always_comb begin
    fcs_bits  = !ctrlreg1.proto ? '0 : (ctrlreg1.crc32 ? CNT_W'(32) : CNT_W'(16));
    addr_bits = ctrlreg1.addr16 ? CNT_W'(ADDR_W) : CNT_W'(HALF_W);
    exp_len   = CNT_W'(DATA_W) + addr_bits + fcs_bits;
  end

  logic [ADDR_W-1:0] addr_field;
  logic [DATA_W-1:0] data_field;
  logic              len_ok;
  always_comb begin
    addr_field = ADDR_W'(reg6 >> fcs_bits);
    if (!ctrlreg1.addr16) addr_field[ADDR_W-1:HALF_W] = '0;
    data_field = DATA_W'(reg6 >> (fcs_bits + addr_bits));
    len_ok     = (count == exp_len);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      station      <= '0;
      ctrlreg1     <= '0;
      reg6         <= '0;
      count        <= '0;
      judge        <= 1'b0;
      rxdataout    <= '0;
      rxaddressout <= '0;
      rx_valid     <= 1'b0;
      statreg      <= '0;
      crc2         <= '0;
    end else begin
      rx_valid <= 1'b0;
      judge    <= 1'b0;
      if (wrxaddrlo) station[HALF_W-1:0]      <= rxaddressin1;
      if (wrxaddrhi) station[ADDR_W-1:HALF_W] <= rxaddressin2;
      if (wrxctrl)   ctrlreg1                 <= rxctrlin;
      if (wrxstatus) statreg                  <= '0;

      if (dvalid) begin
        reg6 <= {reg6[FRAME_W-2:0], dbit};
        if (count != CNT_W'(FRAME_W + 1)) count <= count + 1'b1;
      end
      if (aborted) begin
        count         <= '0;
        if (ctrlreg1.en) statreg.aborted <= 1'b1;
      end else if (flag && (count != '0 || dvalid)) begin
        judge <= 1'b1;
      end

      if (judge) begin
        count <= '0;
        crc2  <= crc;
        if (ctrlreg1.en) begin
          if (!len_ok) begin
            statreg.len_err <= 1'b1;
          end else if (ctrlreg1.proto && !crc_zero) begin
            statreg.crc_err <= 1'b1;
          end else begin
            rxdataout          <= data_field;
            rxaddressout       <= addr_field;
            rx_valid           <= 1'b1;
            statreg.frame_ok   <= 1'b1;
            statreg.addr_match <= (addr_field == (ctrlreg1.addr16 ? station
                                   : {{(ADDR_W-HALF_W){1'b0}}, station[HALF_W-1:0]}));
          end
        end
      end
    end
  end

  // After a flag no frame bit can arrive for eight line bits, so the frame
  // register is stable while the frame is judged.
  a_quiet: assert property (@(posedge clk) disable iff (reset) judge |-> !dvalid);

endmodule
