// bit_stuffer_tb: checks the transmit serializer.
//
// The line bit enable is random. Frames of random length and content (some
// all ones, so that zero insertion happens at the end of a frame as well) are
// loaded. The bits sent while `in_frame` is high must equal the reference
// zero-inserted frame. The eight bits before and after must be flags, and
// the line must carry only flags between frames. `ready` must rise exactly
// when the last frame bit has been sent.
module bit_stuffer_tb;
  import hdlc_ref_pkg::*;

  localparam int FW = 40;

  logic          clk = 0, reset = 1, bit_en = 0, load = 0;
  logic [FW-1:0] frame = '0;
  logic [5:0]    nbits = '0;
  logic          ready, txd, in_frame, stuffed;
  int            checks = 0, failures = 0, nstuffed = 0;

  bit_stuffer #(.FRAME_W(FW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line recorder: every enabled bit with its in_frame flag.
  bit line[$];
  bit lif[$];
  always @(posedge clk) if (!reset && bit_en) begin
    line.push_back(txd);
    lif.push_back(in_frame);
    if (stuffed) nstuffed++;
  end

  always @(negedge clk) bit_en = ($urandom_range(0, 2) != 0);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    bitq_t exp;
    bitq_t got;
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (40) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      bit [127:0] v;
      int         n;
      int         start;
      n = $urandom_range(1, FW);
      v = {$urandom, $urandom, $urandom, $urandom};
      if (t % 7 == 0) v = '1;
      v = v & ((128'd1 << n) - 1);
      exp = stuff(to_bits(v, n));
      line.delete();
      lif.delete();
      repeat (30) @(negedge clk);
      check(ready, "ready before load");
      frame = FW'(v << (FW - n));
      nbits = 6'(n);
      load  = 1;
      @(negedge clk);
      load = 0;
      // wait for the frame to be sent
      while (!ready) @(negedge clk);
      check(!in_frame, "in_frame low when ready");
      // a closing flag and some idle
      repeat ($urandom_range(20, 40)) @(negedge clk);
      got.delete();
      start = -1;
      foreach (lif[i]) if (lif[i]) begin
        if (start < 0) start = i;
        got.push_back(line[i]);
      end
      check(got == exp, $sformatf("frame %0d: %0d bits sent, %0d expected", t, got.size(), exp.size()));
      if (start >= 8) begin
        bit [7:0] pre;
        bit [7:0] post;
        for (int k = 0; k < 8; k++) pre[7-k] = line[start - 8 + k];
        for (int k = 0; k < 8; k++) post[7-k] = line[start + got.size() + k];
        check(pre == REF_FLAG, $sformatf("opening flag %b", pre));
        check(post == REF_FLAG, $sformatf("closing flag %b", post));
      end else check(0, "no opening flag recorded");
    end
    check(nstuffed > 0, "zero insertion never happened");
    $display("stuffed zeros: %0d", nstuffed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
