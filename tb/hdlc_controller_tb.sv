// hdlc_controller_tb: end-to-end test of the HDLC controller at its default
// parameters (8-bit data, 16-bit address register).
//
// Phase 1, loopback: the receiver listens to the transmitter. Frames in every
// format (8/16-bit address, CRC-16/CRC-32, transparent mode) go through
// transmitter, line and receiver. The reference cases come first. The
// transmitted FCS must match the reference division, the receiver must
// deliver the same data and address with a zero remainder, and the line
// must carry flags while idle. With one line bit per clock, `rx_valid` must
// follow the last frame bit by exactly 9 clocks: 8 for the closing flag and
// 1 to judge the frame.
// Phase 2, external line: the testbench copies txd to rxd. It can flip one
// frame bit (the frame must be discarded with crc_err) or force ones (abort).
// Phase 3, full duplex: while the transmitter sends one frame, the receiver
// takes a different frame that the testbench builds on rxd with its own bit
// clock. Both must arrive intact.
// Every mechanism is counted, and one that never happened is a failure.
module hdlc_controller_tb;
  import hdlc_pkg::*;
  import hdlc_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [7:0]  datain = '0, txaddressin1 = '0, txaddressin2 = '0;
  logic        wrtaddrlo = 0, wrtaddrhi = 0, wrtctrl = 0;
  ctrl_t       txctrlin = '0;
  logic [15:0] txaddressout;
  ctrl_t       txctrlreg;
  logic [31:0] crc1;
  logic        tx_busy, tx_done;
  logic        wrxctrl = 0, wrxaddrlo = 0, wrxaddrhi = 0, wrxstatus = 0;
  ctrl_t       rxctrlin = '0;
  logic [7:0]  rxaddressin1 = '0, rxaddressin2 = '0;
  ctrl_t       rxctrlreg;
  logic [7:0]  rxdataout;
  logic [15:0] rxaddressout;
  logic        rx_valid;
  rx_status_t  rxstatus;
  logic [31:0] crc2;
  logic        loopback = 1, tx_bit_en = 0, rx_bit_en = 0, txd, rxd = 1;
  logic        tx_in_frame, tx_stuffed, rx_deleted;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_crc16 = 0, n_crc32 = 0, n_addr8 = 0, n_addr16 = 0, n_transp = 0;
  int n_stuff = 0, n_delete = 0, n_idle_flag = 0, n_crc_err = 0, n_abort = 0;
  int n_match = 0, n_duplex = 0, n_valid = 0, n_latency = 0;

  hdlc_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line bit clock: random, or every cycle when `fast` is set.
  bit fast = 0;
  bit ext_drive = 0;          // phase 3: rxd driven by the testbench generator
  bit flip_pending = 0;       // phase 2: flip one frame bit on the way
  int flip_at = 0;
  int force_ones = 0;         // phase 2: drive this many ones instead of txd
  int frame_bit = 0;
  always @(negedge clk) begin
    tx_bit_en = fast ? 1'b1 : ($urandom_range(0, 2) != 0);
    if (!ext_drive) rx_bit_en = tx_bit_en;
  end

  // Phase 2 line: copy of txd with optional damage.
  always @(negedge clk) if (!loopback && !ext_drive) begin
    rxd = txd;
    if (tx_bit_en && tx_in_frame) begin
      if (flip_pending && frame_bit == flip_at) begin
        rxd = !txd;
        flip_pending = 0;
      end
      if (force_ones > 0) begin
        rxd = 1'b1;
        force_ones--;
      end
    end
  end
  always @(posedge clk) begin
    if (tx_bit_en && tx_in_frame) frame_bit++;
    if (!tx_in_frame) frame_bit = 0;
    if (tx_stuffed) n_stuff++;
    if (rx_deleted) n_delete++;
    if (rx_valid) n_valid++;
  end

  // Idle line watcher: 8 bits sent while idle must form a flag.
  bit [7:0] idle_sr;
  int       idle_cnt = 0;
  always @(posedge clk) if (!reset && tx_bit_en) begin
    if (tx_in_frame) idle_cnt = 0;
    else begin
      idle_sr = {idle_sr[6:0], txd};
      idle_cnt++;
      if (idle_cnt == 8) begin
        checks++;
        if (idle_sr != REF_FLAG) begin
          failures++;
          $display("FAIL idle line %b", idle_sr);
        end else n_idle_flag++;
        idle_cnt = 0;
      end
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic setup(bit a16, bit c32, bit proto, bit [15:0] a, bit [15:0] station);
    @(negedge clk);
    txaddressin1 = a[7:0]; txaddressin2 = a[15:8];
    wrtaddrlo = 1; wrtaddrhi = a16;
    rxctrlin = '{crc32: c32, rsvd: 1'b0, addr16: a16, proto: proto, en: 1'b1};
    rxaddressin1 = station[7:0]; rxaddressin2 = station[15:8];
    wrxctrl = 1; wrxaddrlo = 1; wrxaddrhi = 1; wrxstatus = 1;
    @(negedge clk);
    wrtaddrlo = 0; wrtaddrhi = 0; wrxctrl = 0; wrxaddrlo = 0; wrxaddrhi = 0;
    wrxstatus = 0;
  endtask

  task automatic start_tx(bit [7:0] d, bit a16, bit c32, bit proto);
    @(negedge clk);
    datain   = d;
    txctrlin = '{crc32: c32, rsvd: 1'b0, addr16: a16, proto: proto, en: 1'b1};
    wrtctrl  = 1;
    @(negedge clk);
    wrtctrl = 0;
  endtask

  // One frame through transmitter and receiver; `expect_ok` says whether the
  // receiver must accept it.
  task automatic one_frame(bit [7:0] d, bit [15:0] a, bit a16, bit c32, bit proto,
                           bit [15:0] station, bit expect_ok);
    bit [15:0]  ea;
    bit [127:0] m;
    int         n0, mlen;
    bit [7:0]   d0;
    bit [15:0]  a0;
    ea   = a16 ? a : {8'h00, a[7:0]};
    mlen = a16 ? 24 : 16;
    m    = ref_msg(64'(d), 8, 64'(ea), a16 ? 16 : 8);
    setup(a16, c32, proto, a, station);
    n0 = n_valid; d0 = rxdataout; a0 = rxaddressout;
    start_tx(d, a16, c32, proto);
    while (!tx_done) @(negedge clk);
    repeat (40) @(negedge clk);
    if (proto) check(crc1 == ref_crc(m, mlen, c32),
                     $sformatf("FCS %h expected %h", crc1, ref_crc(m, mlen, c32)));
    if (expect_ok) begin
      check(n_valid == n0 + 1, "frame not received");
      check(rxdataout == d && rxaddressout == ea,
            $sformatf("received %b/%b, sent %b/%b", rxdataout, rxaddressout, d, ea));
      if (proto) check(crc2 == 0, "receiver remainder not zero");
      check(rxstatus.frame_ok, "frame_ok not set");
      if (rxstatus.addr_match) n_match++;
      if (proto && c32) n_crc32++;
      if (proto && !c32) n_crc16++;
      if (!proto) n_transp++;
      if (a16) n_addr16++; else n_addr8++;
    end else begin
      check(n_valid == n0, "damaged frame delivered");
      check(rxdataout == d0 && rxaddressout == a0, "outputs changed by damaged frame");
    end
  endtask

  // rx_valid must follow the last frame bit by 9 clocks at one bit per clock.
  int last_bit_cyc = 0, cyc = 0;
  bit prev_in_frame = 0;
  always @(posedge clk) begin
    cyc++;
    if (prev_in_frame && !tx_in_frame) last_bit_cyc = cyc;
    prev_in_frame = tx_in_frame;
    if (fast && loopback && rx_valid) begin
      checks++;
      if (cyc - last_bit_cyc != 9) begin
        failures++;
        $display("FAIL rx_valid %0d clocks after the last bit", cyc - last_bit_cyc);
      end else n_latency++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (50) @(negedge clk);

    // Phase 1: loopback, reference cases then random frames.
    one_frame(8'b0000_1110, 16'h00F0, 0, 0, 1, 16'h00F0, 1);
    check(crc1[15:0] == 16'b1010_0110_0010_0011, "reference FCS, 8-bit address");
    check(rxdataout == 8'b0000_1110 && rxaddressout == 16'b0000_0000_1111_0000,
          "reference receive, 8-bit address");
    one_frame(8'b0011_0011, 16'hF0F0, 1, 0, 1, 16'hF0F0, 1);
    check(crc1[15:0] == 16'b1010_0001_1101_0011, "reference FCS, 16-bit address");
    check(rxaddressout == 16'b1111_0000_1111_0000, "reference receive, 16-bit address");
    one_frame(8'b1111_0000, 16'h00F0, 0, 1, 1, 16'h00F0, 1);
    check(crc1 == 32'h7A80_E4E8, "reference FCS, CRC-32");
    fast = 1;
    one_frame(8'hA5, 16'h1234, 1, 1, 1, 16'h0000, 1);
    one_frame(8'hFF, 16'hFFFF, 0, 0, 1, 16'h0000, 1);
    fast = 0;
    for (int t = 0; t < 40; t++) begin
      bit [7:0]  d;
      bit [15:0] a;
      d = 8'($urandom); a = 16'($urandom);
      if (t % 6 == 0) begin d = 8'hFF; a = 16'hFFFF; end
      one_frame(d, a, 1'($urandom), 1'($urandom), (t % 5 != 4),
                (t % 2 == 0) ? a : 16'($urandom), 1);
    end

    // Phase 2: external line with damage.
    loopback = 0;
    for (int t = 0; t < 12; t++) begin
      bit a16, c32;
      a16 = 1'(t); c32 = 1'(t >> 1);
      // clean frame over the external line
      one_frame(8'($urandom), 16'($urandom), a16, c32, 1, 16'h0, 1);
      // one flipped bit
      flip_pending = 1;
      flip_at = $urandom_range(0, 20);
      one_frame(8'($urandom), 16'($urandom), a16, c32, 1, 16'h0, 0);
      check(rxstatus.crc_err || rxstatus.len_err, "damaged frame not flagged");
      if (rxstatus.crc_err) n_crc_err++;
      // abort
      force_ones = 8;
      one_frame(8'($urandom), 16'($urandom), a16, c32, 1, 16'h0, 0);
      check(rxstatus.aborted, "abort not flagged");
      if (rxstatus.aborted) n_abort++;
      force_ones = 0;
    end

    // Phase 3: full duplex, the receiver takes a testbench frame while the
    // transmitter sends its own.
    ext_drive = 1;
    for (int t = 0; t < 6; t++) begin
      bit [7:0]  dt, dr;
      bit [15:0] at, ar;
      bitq_t     line;
      bit        a16, c32;
      int        n0;
      a16 = 1'(t); c32 = 1'(t >> 1);
      dt = 8'($urandom); at = 16'($urandom);
      dr = 8'($urandom); ar = 16'($urandom);
      if (!a16) ar[15:8] = 8'h00;
      setup(a16, c32, 1, at, 16'h0);
      line = flag_bits();
      begin
        bitq_t f;
        f = stuff(ref_frame(ref_msg(64'(dr), 8, 64'(ar), a16 ? 16 : 8),
                            a16 ? 24 : 16, c32 ? 32 : 16));
        foreach (f[i]) line.push_back(f[i]);
      end
      begin
        bitq_t fl;
        fl = flag_bits();
        foreach (fl[i]) line.push_back(fl[i]);
      end
      n0 = n_valid;
      start_tx(dt, a16, c32, 1);
      fork
        foreach (line[i]) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            rx_bit_en = 0;
            @(negedge clk);
          end
          rxd = line[i];
          rx_bit_en = 1;
          @(negedge clk);
          rx_bit_en = 0;
        end
        while (!tx_done) @(negedge clk);
      join
      repeat (10) @(negedge clk);
      check(n_valid == n0 + 1, "duplex: frame not received");
      check(rxdataout == dr && rxaddressout == ar, "duplex: wrong frame received");
      check(crc1 == ref_crc(ref_msg(64'(dt), 8, 64'(a16 ? at : {8'h0, at[7:0]}),
                                    a16 ? 16 : 8), a16 ? 24 : 16, c32),
            "duplex: transmitter FCS");
      if (rxdataout == dr) n_duplex++;
    end

    $display("crc16 %0d crc32 %0d addr8 %0d addr16 %0d transparent %0d", n_crc16,
             n_crc32, n_addr8, n_addr16, n_transp);
    $display("stuffed %0d deleted %0d idle flags %0d crc errors %0d aborts %0d",
             n_stuff, n_delete, n_idle_flag, n_crc_err, n_abort);
    $display("address matches %0d duplex %0d latency checks %0d", n_match, n_duplex,
             n_latency);
    check(n_crc16 > 0, "no CRC-16 frame");
    check(n_crc32 > 0, "no CRC-32 frame");
    check(n_addr8 > 0, "no 8-bit address frame");
    check(n_addr16 > 0, "no 16-bit address frame");
    check(n_transp > 0, "no transparent frame");
    check(n_stuff > 0, "no zero insertion");
    check(n_delete > 0, "no zero deletion");
    check(n_idle_flag > 0, "no idle flags");
    check(n_crc_err > 0, "no FCS error detected");
    check(n_abort > 0, "no abort");
    check(n_match > 0, "no address match");
    check(n_duplex > 0, "no full-duplex transfer");
    check(n_latency > 0, "latency never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
