// crc_lfsr_tb: checks the bit-serial CRC divider.
//
// Known remainders of the reference waveforms:
//   data 00001110, address 11110000, CRC-16          -> 1010011000100011
//   data 00110011, address 1111000011110000, CRC-16  -> 1010000111010011
//   data 11110000, address 11110000, CRC-32          -> 0x7A80E4E8
// Then random messages of random length in both modes, compared with a long
// division, and each message followed by its FCS must leave a zero
// remainder (the receiver's check). One bit per enabled clock: the result is
// checked exactly one cycle after the last bit.
module crc_lfsr_tb;
  import hdlc_ref_pkg::*;

  logic        clk = 0, reset = 1, clear = 0, sel32 = 0, bit_en = 0, bit_in = 0;
  logic [31:0] crc;
  logic        zero;
  int          checks = 0, failures = 0;

  crc_lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(bit [127:0] v, int n, bit s32);
    @(negedge clk);
    sel32 = s32; clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = n - 1; i >= 0; i--) begin
      bit_en = ($urandom_range(0, 3) != 0);
      bit_in = v[i];
      if (!bit_en) begin
        @(negedge clk);
        bit_en = 1;
      end
      @(negedge clk);
    end
    bit_en = 0;
  endtask

  task automatic check(string what, bit [31:0] exp);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s: crc=%h expected %h", what, crc, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    feed(128'h0EF0, 16, 0);
    check("fig crc16 8-bit address", 32'h0000_A623);
    feed(128'h33F0F0, 24, 0);
    check("fig crc16 16-bit address", 32'h0000_A1D3);
    feed(128'hF0F0, 16, 1);
    check("fig crc32", 32'h7A80_E4E8);
    for (int t = 0; t < 300; t++) begin
      bit [127:0] m;
      int         n;
      bit         s32;
      bit [31:0]  r;
      int         w;
      m   = {$urandom, $urandom, $urandom, $urandom};
      n   = $urandom_range(1, 64);
      s32 = $urandom_range(0, 1);
      w   = s32 ? 32 : 16;
      m   = m & ((128'd1 << n) - 1);
      r   = ref_crc(m, n, s32);
      feed(m, n, s32);
      check("random", r);
      // receiver side: message followed by its FCS divides evenly
      feed((m << w) | 128'(r), n + w, s32);
      checks++;
      if (!zero) begin
        failures++;
        $display("FAIL check remainder %h for n=%0d", crc, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
