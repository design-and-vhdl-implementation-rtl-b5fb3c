// hdlc_controller_wide_tb: the controller built for wider formats.
//
// Two controllers run in loopback side by side. One has 16-bit data and a
// 16-bit address register (frames with 8- or 16-bit address). The other has
// 32-bit data and a 32-bit address register (16- or 32-bit address). Each
// sends random frames with CRC-16 and CRC-32. The transmitted FCS must match
// the reference division, and the receiver must deliver the same data and
// address with a zero remainder.
module hdlc_controller_wide_tb;
  import hdlc_pkg::*;
  import hdlc_ref_pkg::*;

  logic clk = 0, reset = 1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ---------------- 16-bit data, 16-bit address ----------------
  logic [15:0] a_datain = '0;
  logic [7:0]  a_ain1 = '0, a_ain2 = '0;
  logic        a_wlo = 0, a_whi = 0, a_wctrl = 0, a_wrxctrl = 0;
  ctrl_t       a_ctrl = '0;
  logic [15:0] a_rxdata, a_rxaddr, a_txaddr;
  logic [31:0] a_crc1, a_crc2;
  logic        a_done, a_valid, a_bit_en = 0;

  hdlc_controller #(.DATA_W(16), .ADDR_W(16)) dut_a (
    .clk(clk), .reset(reset), .datain(a_datain), .txaddressin1(a_ain1),
    .txaddressin2(a_ain2), .wrtaddrlo(a_wlo), .wrtaddrhi(a_whi), .wrtctrl(a_wctrl),
    .txctrlin(a_ctrl), .txaddressout(a_txaddr), .txctrlreg(), .crc1(a_crc1),
    .tx_busy(), .tx_done(a_done), .wrxctrl(a_wrxctrl), .rxctrlin(a_ctrl),
    .rxaddressin1(8'h0), .rxaddressin2(8'h0), .wrxaddrlo(1'b0), .wrxaddrhi(1'b0),
    .wrxstatus(1'b0), .rxctrlreg(), .rxdataout(a_rxdata), .rxaddressout(a_rxaddr),
    .rx_valid(a_valid), .rxstatus(), .crc2(a_crc2), .loopback(1'b1),
    .tx_bit_en(a_bit_en), .rx_bit_en(1'b0), .txd(), .rxd(1'b1), .tx_in_frame(),
    .tx_stuffed(), .rx_deleted()
  );

  // ---------------- 32-bit data, 32-bit address ----------------
  logic [31:0] b_datain = '0;
  logic [15:0] b_ain1 = '0, b_ain2 = '0;
  logic        b_wlo = 0, b_whi = 0, b_wctrl = 0, b_wrxctrl = 0;
  ctrl_t       b_ctrl = '0;
  logic [31:0] b_rxdata, b_rxaddr, b_txaddr;
  logic [31:0] b_crc1, b_crc2;
  logic        b_done, b_valid, b_bit_en = 0;

  hdlc_controller #(.DATA_W(32), .ADDR_W(32)) dut_b (
    .clk(clk), .reset(reset), .datain(b_datain), .txaddressin1(b_ain1),
    .txaddressin2(b_ain2), .wrtaddrlo(b_wlo), .wrtaddrhi(b_whi), .wrtctrl(b_wctrl),
    .txctrlin(b_ctrl), .txaddressout(b_txaddr), .txctrlreg(), .crc1(b_crc1),
    .tx_busy(), .tx_done(b_done), .wrxctrl(b_wrxctrl), .rxctrlin(b_ctrl),
    .rxaddressin1(16'h0), .rxaddressin2(16'h0), .wrxaddrlo(1'b0), .wrxaddrhi(1'b0),
    .wrxstatus(1'b0), .rxctrlreg(), .rxdataout(b_rxdata), .rxaddressout(b_rxaddr),
    .rx_valid(b_valid), .rxstatus(), .crc2(b_crc2), .loopback(1'b1),
    .tx_bit_en(b_bit_en), .rx_bit_en(1'b0), .txd(), .rxd(1'b1), .tx_in_frame(),
    .tx_stuffed(), .rx_deleted()
  );

  always @(negedge clk) begin
    a_bit_en = ($urandom_range(0, 3) != 0);
    b_bit_en = ($urandom_range(0, 3) != 0);
  end

  int a_nvalid = 0, b_nvalid = 0;
  always @(posedge clk) begin
    if (a_valid) a_nvalid++;
    if (b_valid) b_nvalid++;
  end

  task automatic frame_a(bit [15:0] d, bit [15:0] a, bit a16, bit c32);
    bit [15:0]  ea;
    bit [127:0] m;
    int         n0, ab;
    ab = a16 ? 16 : 8;
    ea = a16 ? a : {8'h0, a[7:0]};
    m  = ref_msg(64'(d), 16, 64'(ea), ab);
    @(negedge clk);
    a_ain1 = a[7:0]; a_ain2 = a[15:8]; a_wlo = 1; a_whi = 1;
    a_datain = d;
    a_ctrl = '{crc32: c32, rsvd: 1'b0, addr16: a16, proto: 1'b1, en: 1'b1};
    a_wrxctrl = 1; a_wctrl = 1;
    n0 = a_nvalid;
    @(negedge clk);
    a_wlo = 0; a_whi = 0; a_wrxctrl = 0; a_wctrl = 0;
    while (!a_done) @(negedge clk);
    repeat (30) @(negedge clk);
    check(a_crc1 == ref_crc(m, 16 + ab, c32), "16/16: FCS");
    check(a_nvalid == n0 + 1, "16/16: frame not received");
    check(a_rxdata == d && a_rxaddr == ea, "16/16: wrong data or address");
    check(a_crc2 == 0, "16/16: remainder not zero");
  endtask

  task automatic frame_b(bit [31:0] d, bit [31:0] a, bit a32, bit c32);
    bit [31:0]  ea;
    bit [127:0] m;
    int         n0, ab;
    ab = a32 ? 32 : 16;
    ea = a32 ? a : {16'h0, a[15:0]};
    m  = ref_msg(64'(d), 32, 64'(ea), ab);
    @(negedge clk);
    b_ain1 = a[15:0]; b_ain2 = a[31:16]; b_wlo = 1; b_whi = 1;
    b_datain = d;
    b_ctrl = '{crc32: c32, rsvd: 1'b0, addr16: a32, proto: 1'b1, en: 1'b1};
    b_wrxctrl = 1; b_wctrl = 1;
    n0 = b_nvalid;
    @(negedge clk);
    b_wlo = 0; b_whi = 0; b_wrxctrl = 0; b_wctrl = 0;
    while (!b_done) @(negedge clk);
    repeat (30) @(negedge clk);
    check(b_crc1 == ref_crc(m, 32 + ab, c32), "32/32: FCS");
    check(b_nvalid == n0 + 1, "32/32: frame not received");
    check(b_rxdata == d && b_rxaddr == ea, "32/32: wrong data or address");
    check(b_crc2 == 0, "32/32: remainder not zero");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (20) @(negedge clk);
    fork
      for (int t = 0; t < 30; t++)
        frame_a(16'($urandom), 16'($urandom), 1'(t), 1'(t >> 1));
      for (int t = 0; t < 30; t++)
        frame_b($urandom, $urandom, 1'(t), 1'(t >> 1));
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
