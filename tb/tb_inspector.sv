// tb_inspector: presents packets in a model packet buffer and answers the
// Bloom filter queries from a model that holds an exact set of suspect
// addresses. Checks, for both interception modes, the destination ports and
// match flag of every decision, that an IPv4 packet causes exactly two
// queries (source, then destination, in consecutive cycles) and a non-IPv4
// or truncated packet none, the 7-cycle buffer-to-decision latency, that the
// buffer is released exactly when the decision is taken, and that nothing
// starts while the filter is not ready.
module tb_inspector;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int BW = 6, BAW = $clog2(BW);

  logic clk = 0, rst_n = 0;
  li_mode_e mode;
  logic bf_ready, buf_valid, buf_release, hp_req, hp_valid, hp_hit;
  logic dec_valid, dec_match, dec_ready;
  logic [7:0] dec_dst;
  logic [BAW:0] buf_len;
  logic [BAW-1:0] rd_addr;
  logic [31:0] hp_ip;
  bus_word_t bufm [BW];
  bus_word_t rd_data;
  bit suspects [logic [31:0]];
  logic [31:0] qlog[$];
  int checks = 0, failures = 0;

  inspector #(.BUF_WORDS(BW)) dut (.*);
  always #5 clk = ~clk;
  assign rd_data = bufm[rd_addr];

  // Bloom filter model: exact set, answers one cycle later
  always @(posedge clk) begin
    hp_valid <= hp_req;
    hp_hit   <= hp_req && suspects.exists(hp_ip);
    if (hp_req) qlog.push_back(hp_ip);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic run_pkt(li_mode_e m, int sp, bit ip4, bit trunc, logic [31:0] sip, logic [31:0] dip);
    pkt_t p;
    int lat, n;
    bit exp_hit;
    p = make_pkt(sp, 64, ip4 ? ETHERTYPE_IPV4 : 16'h86DD, sip, dip);
    n = trunc ? 5 : BW;
    for (int i = 0; i < BW; i++) bufm[i] = i < n ? p[i] : '0;
    qlog.delete();
    @(negedge clk);
    mode = m; buf_len = (BAW+1)'(n); buf_valid = 1;
    lat = 0;
    while (!dec_valid) begin @(negedge clk); lat++; chk(!buf_release, "no early release"); end
    if (ip4 && !trunc) begin
      chk(lat == 7, $sformatf("decision latency 7 (got %0d)", lat));
      chk(qlog.size() == 2 && qlog[0] == sip && qlog[1] == dip, "two queries: source then destination");
    end else begin
      chk(qlog.size() == 0, "no query for non-IPv4");
    end
    exp_hit = ip4 && !trunc && (suspects.exists(sip) || suspects.exists(dip));
    chk(dec_match == exp_hit, "match flag");
    chk(dec_dst == ref_ports(m, sp, exp_hit), $sformatf("ports %h exp %h", dec_dst, ref_ports(m, sp, exp_hit)));
    // output stage takes the header after a random wait
    repeat ($urandom_range(0, 5)) begin
      @(negedge clk);
      chk(dec_valid && !buf_release, "decision held until taken");
    end
    dec_ready = 1;
    #1 chk(buf_release, "release with decision taken");
    @(negedge clk);
    dec_ready = 0; buf_valid = 0;
    chk(!dec_valid, "decision dropped after being taken");
  endtask

  initial begin
    logic [31:0] sus[4];
    int n_hit;
    n_hit = 0;
    mode = MODE_FWD_TAP; bf_ready = 0; buf_valid = 0; buf_len = 0; dec_ready = 0;
    hp_valid = 0; hp_hit = 0;
    foreach (bufm[i]) bufm[i] = '0;
    foreach (sus[i]) begin sus[i] = $urandom; suspects[sus[i]] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // not ready: buffer offered, nothing must happen
    @(negedge clk); buf_valid = 1; buf_len = (BAW+1)'(BW);
    repeat (20) begin @(negedge clk); chk(!dec_valid && !hp_req, "idle while filter not ready"); end
    buf_valid = 0; bf_ready = 1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      li_mode_e m;
      int sp, kind;
      logic [31:0] sip, dip;
      m    = (k % 2 != 0) ? MODE_TAP_DROP : MODE_FWD_TAP;
      sp   = $urandom_range(0, 7);
      kind = $urandom_range(0, 9);
      sip  = (kind == 1 || kind == 3) ? sus[$urandom_range(0, 3)] : $urandom;
      dip  = (kind == 2 || kind == 3) ? sus[$urandom_range(0, 3)] : $urandom;
      if (kind >= 1 && kind <= 3) n_hit++;
      run_pkt(m, sp, kind != 4, kind == 5, sip, dip);
    end
    chk(n_hit > 50, "enough matching packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
