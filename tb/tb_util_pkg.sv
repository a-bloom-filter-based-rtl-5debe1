// tb_util_pkg: reference models and packet builders shared by the
// testbenches of the Bloom filter traffic inspector.
//
// ref_h1/ref_h2 recompute the two Fibonacci hashes with a 64-bit product and
// an explicit loop-built permutation, independently of bf_hash. make_pkt
// builds a packet as the pipeline carries it: a module header word, then the
// Ethernet frame in 64-bit words (byte 0 in bits [63:56]); the last word's
// ctrl marks its last valid byte.
package tb_util_pkg;
  import bi_pkg::*;

  typedef bus_word_t pkt_t[$];

  function automatic int ref_fib(logic [31:0] key, int idx_w);
    logic [63:0] p;
    p = 64'(key) * 64'd2654435769;
    return int'(p[31:0] >> (32 - idx_w));
  endfunction

  function automatic logic [31:0] ref_perm(logic [31:0] ip);
    logic [31:0] r = '0;
    for (int i = 0; i < 32; i++) if (ip[i]) r |= 32'h8000_0000 >> i;
    return r;
  endfunction

  function automatic int ref_h1(logic [31:0] ip, int idx_w);
    return ref_fib(ip, idx_w);
  endfunction

  function automatic int ref_h2(logic [31:0] ip, int idx_w);
    return ref_fib(ref_perm(ip), idx_w);
  endfunction

  // Build one packet. nbytes >= 14.
  function automatic pkt_t make_pkt(int src_port, int nbytes, logic [15:0] etype,
                                    logic [31:0] sip, logic [31:0] dip);
    pkt_t q;
    byte unsigned fr[];
    int nw;
    bus_word_t w;
    fr = new[nbytes];
    foreach (fr[i]) fr[i] = 8'($urandom);
    fr[12] = etype[15:8];  fr[13] = etype[7:0];
    if (nbytes >= 34) begin
      fr[14] = 8'h45;
      {fr[26], fr[27], fr[28], fr[29]} = sip;
      {fr[30], fr[31], fr[32], fr[33]} = dip;
    end
    nw = (nbytes + 7) / 8;
    w.ctrl = IOQ_HDR_CTRL;
    w.data = {16'h0000, 16'(nw), 16'(src_port), 16'(nbytes)};
    q.push_back(w);
    for (int i = 0; i < nw; i++) begin
      w.data = '0;
      for (int b = 0; b < 8; b++)
        if (8*i + b < nbytes) w.data[63 - 8*b -: 8] = fr[8*i + b];
      if (i == nw - 1) w.ctrl = 8'h80 >> ((nbytes - 1) % 8);
      else             w.ctrl = 8'h00;
      q.push_back(w);
    end
    return q;
  endfunction

  // Expected destination ports for a packet from src_port.
  function automatic logic [7:0] ref_ports(li_mode_e m, int src_port, bit hit);
    int idx = (src_port / 2) % 4;
    logic [7:0] cpu = 8'(1 << (2*idx + 1));
    logic [7:0] mac = 8'(1 << (2*(idx ^ 1)));
    if (m == MODE_TAP_DROP) return hit ? cpu : 8'h00;
    return mac | (hit ? cpu : 8'h00);
  endfunction
endpackage
