// bit_stuffer: HDLC transmit serializer with flags and zero insertion.
//
// When nothing is to be sent the line carries back-to-back flags 01111110.
// A frame handed over with `load` waits for the end of the current flag and is
// then shifted out most significant bit first. That flag is its opening flag.
// After every fifth consecutive one in the frame a 0 is inserted, so a flag
// never appears inside a frame. When the last frame bit (and its stuffed zero,
// if any) has gone out, flags resume. The first of them is the closing flag.
// Flags, zero insertion and idle flags are standard HDLC. The MSB-first bit
// order matches the polynomial division of the frame check sequence.
//
// Interface: `frame` is left aligned. The first bit sent is
// frame[FRAME_W-1], and `nbits` (at least 1) bits are sent. `load` is taken
// only while `ready` is high. `ready` drops on `load` and rises again in the
// cycle after the last frame bit. `bit_en` is the line bit clock enable:
// one line bit per enabled cycle. `txd` is valid throughout that bit.
// `stuffed` marks each enabled cycle in which an inserted zero is on the line.
module bit_stuffer
  import hdlc_pkg::*;
#(
  parameter int unsigned FRAME_W = 56,
  localparam int unsigned CNT_W  = $clog2(FRAME_W + 1)
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               bit_en,
  input  logic               load,
  input  logic [FRAME_W-1:0] frame,
  input  logic [CNT_W-1:0]   nbits,
  output logic               ready,
  output logic               txd,
  output logic               in_frame,
  output logic               stuffed
);

  typedef enum logic [1:0] {S_FLAG, S_DATA, S_STUFF} state_t;

  state_t             state;
  logic [2:0]         fidx;     // index of the flag bit on the line, 0 = first
  logic [2:0]         ones;     // consecutive ones sent in the frame
  logic [FRAME_W-1:0] shreg;
  logic [CNT_W-1:0]   cnt;      // frame bits still to send
  logic               pending;

  assign ready    = !pending;
  assign in_frame = (state != S_FLAG);
  assign stuffed  = bit_en && (state == S_STUFF);

  always_comb begin
    unique case (state)
      S_FLAG:  txd = FLAG[3'd7 - fidx];
      S_DATA:  txd = shreg[FRAME_W-1];
      default: txd = 1'b0;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state   <= S_FLAG;
      fidx    <= '0;
      ones    <= '0;
      shreg   <= '0;
      cnt     <= '0;
      pending <= 1'b0;
    end else begin
      if (load && !pending) begin
        shreg   <= frame;
        cnt     <= nbits;
        pending <= 1'b1;
      end
      if (bit_en) begin
        unique case (state)
          S_FLAG: begin
            fidx <= fidx + 3'd1;
            if (fidx == 3'd7 && pending) begin
              state <= S_DATA;
              ones  <= '0;
            end
          end
          S_DATA: begin
            shreg <= {shreg[FRAME_W-2:0], 1'b0};
            cnt   <= cnt - 1'b1;
            if (shreg[FRAME_W-1]) begin
              if (ones == 3'd4) begin
                state <= S_STUFF;
                ones  <= '0;
              end else begin
                ones <= ones + 3'd1;
                if (cnt == CNT_W'(1)) begin
                  state   <= S_FLAG;
                  fidx    <= '0;
                  pending <= 1'b0;
                end
              end
            end else begin
              ones <= '0;
              if (cnt == CNT_W'(1)) begin
                state   <= S_FLAG;
                fidx    <= '0;
                pending <= 1'b0;
              end
            end
          end
          default: begin // S_STUFF
            if (cnt == '0) begin
              state   <= S_FLAG;
              fidx    <= '0;
              pending <= 1'b0;
            end else begin
              state <= S_DATA;
            end
          end
        endcase
      end
    end
  end

  // A frame is only accepted with at least one bit in it.
  a_nbits: assert property (@(posedge clk) disable iff (reset)
                            (load && !pending) |-> (nbits != '0));

endmodule
