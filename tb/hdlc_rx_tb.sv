// hdlc_rx_tb: checks the receiver.
//
// The testbench builds the line stream itself: flags, then frames made by the
// reference model ({data, address, FCS}, zero inserted), separated by flags.
// The cases are:
//   - the reference frames (data 00001110 / address 11110000 / CRC-16,
//     data 00110011 / address 1111000011110000 / CRC-16, data 11110000 /
//     address 11110000 / CRC-32): outputs equal the sent values, remainder 0
//   - random frames in all four formats and in transparent mode
//   - one flipped bit: crc_err set, frame discarded, outputs unchanged
//   - a frame one byte too long: len_err set, frame discarded
//   - an aborted frame (seven ones): abort set, nothing delivered
//   - station address compare, and a disabled receiver that ignores frames
// Status is cleared with wrxstatus before every case.
module hdlc_rx_tb;
  import hdlc_pkg::*;
  import hdlc_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic        wrxctrl = 0, wrxaddrlo = 0, wrxaddrhi = 0, wrxstatus = 0;
  ctrl_t       rxctrlin = '0;
  logic [7:0]  rxaddressin1 = '0, rxaddressin2 = '0;
  ctrl_t       ctrlreg1;
  logic [7:0]  rxdataout;
  logic [15:0] rxaddressout;
  logic        rx_valid;
  rx_status_t  statreg;
  logic [31:0] crc2;
  logic        rx_bit_en = 0, rxd = 1, rx_deleted;
  int          checks = 0, failures = 0, nvalid = 0;

  hdlc_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rx_valid) nvalid++;

  initial begin
    repeat (500000) @(posedge clk);
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

  task automatic send_bit(bit b);
    @(negedge clk);
    while ($urandom_range(0, 2) == 0) begin
      rx_bit_en = 0;
      @(negedge clk);
    end
    rx_bit_en = 1;
    rxd       = b;
    @(negedge clk);
    rx_bit_en = 0;
  endtask

  task automatic send_q(bitq_t q);
    foreach (q[i]) send_bit(q[i]);
  endtask

  task automatic config_rx(bit a16, bit c32, bit proto, bit en, bit [15:0] station);
    @(negedge clk);
    rxctrlin     = '{crc32: c32, rsvd: 1'b0, addr16: a16, proto: proto, en: en};
    rxaddressin1 = station[7:0];
    rxaddressin2 = station[15:8];
    wrxctrl = 1; wrxaddrlo = 1; wrxaddrhi = 1; wrxstatus = 1;
    @(negedge clk);
    wrxctrl = 0; wrxaddrlo = 0; wrxaddrhi = 0; wrxstatus = 0;
  endtask

  // Frame bits for data d, address a in the configured format.
  function automatic bitq_t mk(bit [7:0] d, bit [15:0] a, bit a16, bit c32, bit proto);
    bit [127:0] m;
    int         ab;
    ab = a16 ? 16 : 8;
    m  = ref_msg(64'(d), 8, 64'(a), ab);
    return ref_frame(m, 8 + ab, proto ? (c32 ? 32 : 16) : 0);
  endfunction

  task automatic frame_on_line(bitq_t f);
    send_q(stuff(f));
    send_q(flag_bits());
    repeat (3) @(negedge clk);
  endtask

  // A good frame: outputs and status must follow.
  task automatic good(bit [7:0] d, bit [15:0] a, bit a16, bit c32, bit proto,
                      bit [15:0] station);
    int n0;
    bit [15:0] ea;
    config_rx(a16, c32, proto, 1'b1, station);
    ea = a16 ? a : {8'h00, a[7:0]};
    n0 = nvalid;
    frame_on_line(mk(d, ea, a16, c32, proto));
    check(nvalid == n0 + 1, $sformatf("good frame not delivered (a16=%0d c32=%0d proto=%0d)", a16, c32, proto));
    check(rxdataout == d, $sformatf("data %b expected %b", rxdataout, d));
    check(rxaddressout == ea, $sformatf("address %b expected %b", rxaddressout, ea));
    check(statreg.frame_ok && !statreg.crc_err && !statreg.len_err, "status of good frame");
    if (proto) check(crc2 == 0, "remainder of good frame not zero");
    check(statreg.addr_match == (ea == (a16 ? station : {8'h00, station[7:0]})),
          "address compare");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (16) send_bit(1'b1);
    send_q(flag_bits());
    send_q(flag_bits());

    good(8'b0000_1110, 16'b0000_0000_1111_0000, 0, 0, 1, 16'h00F0);
    good(8'b0011_0011, 16'b1111_0000_1111_0000, 1, 0, 1, 16'hF0F0);
    good(8'b1111_0000, 16'b0000_0000_1111_0000, 0, 1, 1, 16'h00F0);

    for (int t = 0; t < 120; t++) begin
      bit [7:0]  d, d0;
      bit [15:0] a, a0;
      bit        a16, c32, proto;
      bitq_t     f;
      int        n0, k;
      d = 8'($urandom); a = 16'($urandom);
      a16 = 1'($urandom); c32 = 1'($urandom); proto = (t % 5 != 2);
      if (t % 7 == 0) begin d = 8'hFF; a = 16'hFFFF; end
      good(d, a, a16, c32, proto, (t % 3 == 0) ? a : 16'($urandom));
      d0 = rxdataout; a0 = rxaddressout;
      n0 = nvalid;
      unique case (t % 4)
        0: if (proto) begin
          // one flipped bit
          config_rx(a16, c32, proto, 1'b1, 16'h0);
          f = mk(~d, a16 ? ~a : {8'h00, ~a[7:0]}, a16, c32, proto);
          k = $urandom_range(0, f.size() - 1);
          f[k] = !f[k];
          frame_on_line(f);
          check(statreg.crc_err && !statreg.frame_ok, "flipped bit not detected");
        end
        1: begin
          // one byte too long
          config_rx(a16, c32, proto, 1'b1, 16'h0);
          f = mk(~d, a16 ? ~a : {8'h00, ~a[7:0]}, a16, c32, proto);
          repeat (8) f.push_back(1'($urandom));
          frame_on_line(f);
          check(statreg.len_err && !statreg.frame_ok, "wrong length not detected");
        end
        2: begin
          // aborted frame
          config_rx(a16, c32, proto, 1'b1, 16'h0);
          f = mk(~d, a16 ? ~a : {8'h00, ~a[7:0]}, a16, c32, proto);
          send_q(stuff(f));
          repeat (8) send_bit(1'b1);
          send_q(flag_bits());
          repeat (3) @(negedge clk);
          check(statreg.aborted && !statreg.frame_ok, "abort not detected");
        end
        default: begin
          // receiver disabled
          config_rx(a16, c32, proto, 1'b0, 16'h0);
          frame_on_line(mk(~d, a16 ? ~a : {8'h00, ~a[7:0]}, a16, c32, proto));
          check(statreg == '0, "disabled receiver changed status");
        end
      endcase
      check(nvalid == n0, "discarded frame delivered");
      check(rxdataout == d0 && rxaddressout == a0, "outputs changed by discarded frame");
    end
    $display("good frames %0d", nvalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
