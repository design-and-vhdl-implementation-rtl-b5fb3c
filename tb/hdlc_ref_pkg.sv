// hdlc_ref_pkg: reference model used by the testbenches.
//
// It computes frame check sequences by long division of a wide vector and
// builds line bit streams (flags, zero insertion) from bit queues. It shares
// no code with the RTL, so the testbenches compare the RTL with an
// independent calculation.
package hdlc_ref_pkg;

  typedef bit bitq_t[$];

  localparam bit [7:0] REF_FLAG = 8'b0111_1110;

  // Remainder of msg(x) * x^w modulo the generator, msg given as its n
  // least significant bits, most significant first. w is 16 or 32.
  function automatic bit [31:0] ref_crc(bit [127:0] msg, int n, bit is32);
    bit [159:0] v;
    bit [32:0]  g;
    int         w;
    w = is32 ? 32 : 16;
    g = is32 ? 33'h1_04C1_1DB7 : 33'h0_0001_8005;
    v = 160'(msg) << w;
    for (int i = n + w - 1; i >= w; i--)
      if (v[i]) v = v ^ (160'(g) << (i - w));
    return v[31:0];
  endfunction

  // The n least significant bits of v as a queue, most significant first.
  function automatic bitq_t to_bits(bit [127:0] v, int n);
    bitq_t q;
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
    return q;
  endfunction

  // Zero insertion: a 0 after every run of five ones.
  function automatic bitq_t stuff(bitq_t d);
    bitq_t q;
    int    run = 0;
    foreach (d[i]) begin
      q.push_back(d[i]);
      if (d[i]) begin
        run++;
        if (run == 5) begin
          q.push_back(1'b0);
          run = 0;
        end
      end else run = 0;
    end
    return q;
  endfunction

  function automatic bitq_t flag_bits();
    return to_bits(128'(REF_FLAG), 8);
  endfunction

  // Message {data, address}, address of abits bits.
  function automatic bit [127:0] ref_msg(bit [63:0] data, int dbits,
                                         bit [63:0] addr, int abits);
    bit [127:0] m;
    m = 128'(data & ((64'd1 << dbits) - 1));
    m = (m << abits) | 128'(addr & ((64'd1 << abits) - 1));
    return m;
  endfunction

  // Frame {message, FCS}; fcs_bits is 0, 16 or 32.
  function automatic bitq_t ref_frame(bit [127:0] msg, int mbits, int fcs_bits);
    bitq_t q;
    bitq_t c;
    q = to_bits(msg, mbits);
    if (fcs_bits != 0) begin
      c = to_bits(128'(ref_crc(msg, mbits, fcs_bits == 32)), fcs_bits);
      foreach (c[i]) q.push_back(c[i]);
    end
    return q;
  endfunction

endpackage
