// hdlc_tx_tb: checks the transmitter.
//
// First the three reference cases are sent: data 00001110 with 8-bit address
// 11110000 and CRC-16; data 00110011 with 16-bit address 1111000011110000
// and CRC-16; data 11110000 with address 11110000 and CRC-32. The FCS must
// equal the reference remainders. Then random data, addresses and formats
// are sent, transparent mode included. For every frame the line bits sent
// while `tx_in_frame` is high must equal the reference zero-inserted frame
// {data, address, FCS}. The FCS register must change exactly MLEN + 1 cycles
// after the control write: MLEN division cycles, then one cycle that appends and registers it.
// A control write while busy must not start a second frame.
module hdlc_tx_tb;
  import hdlc_pkg::*;
  import hdlc_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [7:0]  datain = '0, txaddressin1 = '0, txaddressin2 = '0;
  logic        wrtaddrlo = 0, wrtaddrhi = 0, wrtctrl = 0;
  ctrl_t       txctrlin = '0;
  logic [15:0] txaddressout;
  ctrl_t       txctrlreg;
  logic [31:0] crc1;
  logic        tx_busy, tx_done, tx_bit_en = 0, txd, tx_in_frame, tx_stuffed;
  int          checks = 0, failures = 0, nframes = 0;

  hdlc_tx dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) tx_bit_en = ($urandom_range(0, 1) != 0);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitq_t got;
  always @(posedge clk) if (!reset && tx_bit_en && tx_in_frame) got.push_back(txd);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Send one frame and check it; returns the FCS register.
  task automatic send(bit [7:0] d, bit [15:0] a, bit a16, bit c32, bit proto,
                      output bit [31:0] fcs);
    ctrl_t      c;
    bit [127:0] m;
    int         mlen, flen, cyc;
    bit [31:0]  fcs0, expfcs;
    bitq_t      exp;
    mlen = 8 + (a16 ? 16 : 8);
    m    = ref_msg(64'(d), 8, 64'(a16 ? a : {8'h0, a[7:0]}), a16 ? 16 : 8);
    exp  = stuff(ref_frame(m, mlen, proto ? (c32 ? 32 : 16) : 0));
    expfcs = ref_crc(m, mlen, c32);
    @(negedge clk);
    txaddressin1 = a[7:0];
    txaddressin2 = a[15:8];
    wrtaddrlo = 1;
    wrtaddrhi = a16;
    @(negedge clk);
    wrtaddrlo = 0;
    wrtaddrhi = 0;
    c = '{crc32: c32, rsvd: 1'b0, addr16: a16, proto: proto, en: 1'b1};
    datain   = d;
    txctrlin = c;
    wrtctrl  = 1;
    fcs0   = crc1;
    got.delete();
    @(posedge clk);
    #1;
    wrtctrl = 0;
    check(txctrlreg == c, "control register");
    if (a16) check(txaddressout == a, "address register");
    else     check(txaddressout[7:0] == a[7:0], "address register low");
    cyc = 0;
    if (proto && fcs0 != expfcs) begin
      while (crc1 == fcs0 && cyc < 200) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      check(cyc == mlen + 1, $sformatf("FCS after %0d cycles, expected %0d", cyc, mlen + 1));
    end
    // a start request while busy is ignored
    @(negedge clk);
    datain  = ~d;
    wrtctrl = 1;
    @(negedge clk);
    wrtctrl = 0;
    check(tx_busy, "busy during frame");
    while (!tx_done) @(negedge clk);
    @(negedge clk);
    check(got == exp, $sformatf("line bits: %0d sent, %0d expected", got.size(), exp.size()));
    if (proto) check(crc1 == expfcs, $sformatf("FCS %h expected %h", crc1, expfcs));
    // nothing further is sent: the ignored request started no frame
    repeat (40) @(negedge clk);
    check(!tx_busy && !tx_in_frame, "second frame started while busy");
    nframes++;
    fcs = crc1;
  endtask

  initial begin
    bit [31:0] f;
    repeat (3) @(posedge clk);
    reset = 0;
    send(8'b0000_1110, 16'h00F0, 0, 0, 1, f);
    check(f[15:0] == 16'b1010_0110_0010_0011, "reference CRC-16, 8-bit address");
    send(8'b0011_0011, 16'hF0F0, 1, 0, 1, f);
    check(f[15:0] == 16'b1010_0001_1101_0011, "reference CRC-16, 16-bit address");
    send(8'b1111_0000, 16'h00F0, 0, 1, 1, f);
    check(f == 32'b0111_1010_1000_0000_1110_0100_1110_1000, "reference CRC-32");
    for (int t = 0; t < 60; t++) begin
      bit [7:0]  d;
      bit [15:0] a;
      d = 8'($urandom);
      a = 16'($urandom);
      if (t % 5 == 0) begin
        d = 8'hFF;
        a = 16'hFFFF;
      end
      send(d, a, 1'($urandom), 1'($urandom), (t % 6 != 3), f);
    end
    $display("frames %0d", nframes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
