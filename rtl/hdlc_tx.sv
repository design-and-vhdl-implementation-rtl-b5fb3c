// hdlc_tx: HDLC transmitter.
//
// The host writes the low and high halves of the address (wrtaddrlo,
// wrtaddrhi), before or in the same cycle as the control register (wrtctrl).
// A control write with the enable bit set captures `datain` and starts a
// frame. The message is the data followed by the address: {data, address}.
// The address is the full ADDR_W bits when control bit addr16 is set,
// otherwise only its low half.
// The message is then divided, one bit per clock, by the CRC-16 or CRC-32
// polynomial (control bit crc32). The remainder is appended behind the
// message, which gives {data, address, FCS}, and the frame goes to the bit
// stuffer. The stuffer sends it between flags with zero insertion. In
// transparent mode (control bit proto clear) no FCS is appended.
// The message layout, the polynomials and the divide-then-append order follow
// the reference waveforms. The write strobes that start a frame and the
// transparent-mode behaviour are this design's own choices.
//
// Timing: the control write is taken at clock edge 0. MLEN edges of division
// follow (MLEN = DATA_W + address bits). The next edge appends the FCS, so
// `crc1` holds the new FCS MLEN + 1 edges after the write. One more edge
// loads the stuffer. The frame begins on the line after the flag
// that is being sent at that moment. `tx_busy` stays high until the last
// frame bit has left the stuffer. `tx_done` pulses then. Writes to the
// control register with the enable bit set are ignored while busy.
module hdlc_tx
  import hdlc_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned HALF_W  = ADDR_W / 2,
  localparam int unsigned MSG_W   = DATA_W + ADDR_W,
  localparam int unsigned FRAME_W = MSG_W + 32,
  localparam int unsigned CNT_W   = $clog2(FRAME_W + 1)
) (
  input  logic              clk,
  input  logic              reset,
  // host side
  input  logic [DATA_W-1:0] datain,
  input  logic [HALF_W-1:0] txaddressin1,   // low half of the address
  input  logic [HALF_W-1:0] txaddressin2,   // high half of the address
  input  logic              wrtaddrlo,
  input  logic              wrtaddrhi,
  input  logic              wrtctrl,
  input  ctrl_t             txctrlin,
  output logic [ADDR_W-1:0] txaddressout,
  output ctrl_t             txctrlreg,
  output logic [31:0]       crc1,           // FCS of the last frame
  output logic              tx_busy,
  output logic              tx_done,
  // line side
  input  logic              tx_bit_en,
  output logic              txd,
  output logic              tx_in_frame,
  output logic              tx_stuffed
);

  typedef enum logic [2:0] {T_IDLE, T_CRC, T_APPEND, T_LOAD, T_SEND} tstate_t;

  tstate_t            state;
  logic [ADDR_W-1:0]  addr;
  logic [MSG_W-1:0]   appaddreg;   // message, left aligned
  logic [MSG_W-1:0]   crcappreg;   // message being shifted into the divider
  logic [CNT_W-1:0]   mlen;        // message bits
  logic [CNT_W-1:0]   cnt;
  logic [FRAME_W-1:0] appreg;      // message with FCS appended, left aligned
  logic [CNT_W-1:0]   flen;        // frame bits
  logic               crc_clear;
  logic               crc_en;
  logic [31:0]        crc;
  logic               st_ready;
  logic               st_load;
  logic               start;

  assign txaddressout = addr;
  assign start        = wrtctrl && txctrlin.en && (state == T_IDLE);

  // Host registers. An address written in the same cycle as the control
  // register already goes into the frame that this write starts.
  logic [ADDR_W-1:0] addr_nxt;
  always_comb begin
    addr_nxt = addr;
    if (wrtaddrlo) addr_nxt[HALF_W-1:0]      = txaddressin1;
    if (wrtaddrhi) addr_nxt[ADDR_W-1:HALF_W] = txaddressin2;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      addr      <= '0;
      txctrlreg <= '0;
    end else begin
      addr <= addr_nxt;
      if (wrtctrl) txctrlreg <= txctrlin;
    end
  end

  crc_lfsr u_crc (
    .clk    (clk),
    .reset  (reset),
    .clear  (crc_clear),
    .sel32  (txctrlreg.crc32),
    .bit_en (crc_en),
    .bit_in (crcappreg[MSG_W-1]),
    .crc    (crc),
    .zero   ()
  );

  assign crc_clear = start;
  assign crc_en    = (state == T_CRC);
  assign st_load   = (state == T_LOAD);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= T_IDLE;
      appaddreg <= '0;
      crcappreg <= '0;
      mlen      <= '0;
      cnt       <= '0;
      appreg    <= '0;
      flen      <= '0;
      crc1      <= '0;
      tx_done   <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          // The control register is written in this same cycle, so the new
          // value is taken from txctrlin.
          if (txctrlin.addr16) begin
            appaddreg <= {datain, addr_nxt};
            crcappreg <= {datain, addr_nxt};
            mlen      <= CNT_W'(DATA_W + ADDR_W);
            cnt       <= CNT_W'(DATA_W + ADDR_W);
          end else begin
            appaddreg <= {datain, addr_nxt[HALF_W-1:0], {(ADDR_W-HALF_W){1'b0}}};
            crcappreg <= {datain, addr_nxt[HALF_W-1:0], {(ADDR_W-HALF_W){1'b0}}};
            mlen      <= CNT_W'(DATA_W + HALF_W);
            cnt       <= CNT_W'(DATA_W + HALF_W);
          end
          state <= txctrlin.proto ? T_CRC : T_APPEND;
        end
        T_CRC: begin
          crcappreg <= {crcappreg[MSG_W-2:0], 1'b0};
          cnt       <= cnt - 1'b1;
          if (cnt == CNT_W'(1)) state <= T_APPEND;
        end
        T_APPEND: begin
          if (txctrlreg.proto) begin
            if (txctrlreg.crc32) begin
              appreg <= {appaddreg, 32'h0} | ({crc, {MSG_W{1'b0}}} >> mlen);
              flen   <= mlen + CNT_W'(32);
            end else begin
              appreg <= {appaddreg, 32'h0} | ({crc[15:0], {(MSG_W+16){1'b0}}} >> mlen);
              flen   <= mlen + CNT_W'(16);
            end
            crc1 <= crc;
          end else begin
            appreg <= {appaddreg, 32'h0};
            flen   <= mlen;
          end
          state <= T_LOAD;
        end
        T_LOAD: if (st_ready) state <= T_SEND;
        default: begin // T_SEND: wait until the stuffer has sent the frame
          if (st_ready) begin
            state   <= T_IDLE;
            tx_done <= 1'b1;
          end
        end
      endcase
    end
  end

  assign tx_busy = (state != T_IDLE);

  bit_stuffer #(.FRAME_W(FRAME_W)) u_stuff (
    .clk      (clk),
    .reset    (reset),
    .bit_en   (tx_bit_en),
    .load     (st_load),
    .frame    (appreg),
    .nbits    (flen),
    .ready    (st_ready),
    .txd      (txd),
    .in_frame (tx_in_frame),
    .stuffed  (tx_stuffed)
  );

endmodule
