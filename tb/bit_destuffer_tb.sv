// bit_destuffer_tb: checks the receive deframer.
//
// The testbench builds a line stream of its own. Idle ones come first, which
// the deframer must ignore while it hunts. Then come flags, and random frames
// with reference zero insertion, separated by one or more flags. Some frames
// are cut short by seven ones (abort) and are followed by idle ones and a
// flag. The bits delivered between two flags must equal the frame that was
// sent, and aborted frames must report `aborted` and deliver nothing after
// it. The line bit enable is random.
module bit_destuffer_tb;
  import hdlc_ref_pkg::*;

  logic clk = 0, reset = 1, bit_en = 0, rxd = 1;
  logic dvalid, dbit, flag, aborted, deleted;
  int   checks = 0, failures = 0;
  int   ndeleted = 0, naborted = 0;

  bit_destuffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receive side: collect delivered bits into frames closed by a flag.
  bitq_t cur;
  bitq_t rxframes[$];
  bit    saw_abort = 0;
  always @(posedge clk) if (!reset) begin
    if (dvalid) cur.push_back(dbit);
    if (deleted) ndeleted++;
    if (aborted) begin
      naborted++;
      saw_abort = 1;
      cur.delete();
    end
    if (flag) begin
      if (cur.size() != 0) rxframes.push_back(cur);
      cur.delete();
    end
  end

  task automatic send_bit(bit b);
    @(negedge clk);
    while ($urandom_range(0, 3) == 0) begin
      bit_en = 0;
      @(negedge clk);
    end
    bit_en = 1;
    rxd    = b;
    @(negedge clk);
    bit_en = 0;
  endtask

  task automatic send_q(bitq_t q);
    foreach (q[i]) send_bit(q[i]);
  endtask

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    bitq_t sent[$];
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (20) send_bit(1'b1);
    send_q(flag_bits());
    for (int t = 0; t < 200; t++) begin
      bit [127:0] v;
      int         n;
      bitq_t      d;
      n = $urandom_range(1, 80);
      v = {$urandom, $urandom, $urandom, $urandom};
      if (t % 9 == 0) v = '1;
      d = to_bits(v, n);
      if (t % 11 == 5) begin
        // aborted frame: some bits, then seven ones, then idle and a flag
        saw_abort = 0;
        send_q(stuff(d));
        repeat (7) send_bit(1'b1);
        repeat ($urandom_range(0, 10)) send_bit(1'b1);
        check(saw_abort, "abort not reported");
        send_q(flag_bits());
      end else begin
        sent.push_back(d);
        send_q(stuff(d));
        repeat ($urandom_range(1, 2)) send_q(flag_bits());
      end
    end
    repeat (4) @(negedge clk);
    check(rxframes.size() == sent.size(),
          $sformatf("%0d frames received, %0d sent", rxframes.size(), sent.size()));
    foreach (sent[i])
      if (i < rxframes.size())
        check(rxframes[i] == sent[i], $sformatf("frame %0d differs", i));
    check(ndeleted > 0, "zero deletion never happened");
    check(naborted > 0, "abort never happened");
    $display("deleted zeros %0d, aborts %0d", ndeleted, naborted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
