// tb_fp_rate: false-positive workload at the full filter size
// (N = 65536 bits, k = 2), run through the complete traffic inspector.
//
// For n = 10, 100 and 1000 suspect addresses, loaded through the user-space
// port, it sends minimum-size IPv4 packets (60 bytes) whose destination
// address is random and whose source address is known to miss, in Tap and
// Drop mode, and counts the packets that are captured. Checks:
// - every packet addressed to a loaded suspect is captured (no false
//   negatives);
// - the captured count equals the count predicted by an independent
//   reference bit array (exact);
// - the measured false-positive rate is close to
//   (1 - exp(-k n / N))^k: 9.31e-8, 9.28e-6 and 9.03e-4 for the three sizes
//   (checked within a statistical tolerance for n = 1000, and as an upper
//   bound for the two smaller sizes, where too few events are expected).
// It also reports the accepted input rate for minimum-size packets.
module tb_fp_rate;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 65536, WW = 32, AW = $clog2(N / WW);
  localparam int M = 100000;   // random packets per size

  logic clk = 0, rst_n = 0;
  li_mode_e mode;
  logic bf_ready;
  logic [63:0] in_data, out_data;
  logic [7:0] in_ctrl, out_ctrl;
  logic in_wr, in_rdy, out_wr, out_rdy;
  logic usr_req, usr_ack, usr_hit;
  usr_op_e usr_op;
  logic [AW-1:0] usr_addr;
  logic [WW-1:0] usr_wdata, usr_rdata;
  logic [31:0] usr_ip;

  bloom_inspector dut (.*);
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  bit ref_bf [N];
  bus_word_t cur[$];
  int captured = 0, sent = 0;
  longint in_words = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic bit ref_test(logic [31:0] ip);
    return ref_bf[ref_h1(ip, 16)] && ref_bf[ref_h2(ip, 16)];
  endfunction

  always @(posedge clk) begin
    if (out_wr && out_ctrl == IOQ_HDR_CTRL) captured++;
    if (in_wr) in_words++;
  end

  task automatic usr(usr_op_e op, logic [31:0] ip);
    @(negedge clk);
    usr_req = 1; usr_op = op; usr_ip = ip;
    do @(posedge clk); while (!usr_ack);
    @(negedge clk);
    usr_req = 0;
  endtask

  // input driver: back to back whenever the inspector is ready
  always @(negedge clk) begin
    in_wr = 0;
    if (rst_n && cur.size() > 0 && in_rdy) begin
      in_wr = 1;
      {in_ctrl, in_data} = cur[0];
    end
  end
  always @(posedge clk) if (in_wr) void'(cur.pop_front());

  task automatic send(logic [31:0] sip, logic [31:0] dip);
    pkt_t p;
    p = make_pkt(2 * $urandom_range(0, 3), 60, ETHERTYPE_IPV4, sip, dip);
    foreach (p[i]) cur.push_back(p[i]);
    sent++;
    // keep the queue short
    while (cur.size() > 64) @(posedge clk);
  endtask

  task automatic drain();
    wait (cur.size() == 0);
    repeat (300) @(posedge clk);
  endtask

  initial begin
    int loaded;
    int targets[3];
    real pfp[3];
    logic [31:0] quiet_src, sus[$];
    mode = MODE_TAP_DROP; in_wr = 0; in_ctrl = 0; in_data = 0; out_rdy = 1;
    usr_req = 0; usr_op = USR_READ; usr_addr = 0; usr_wdata = 0; usr_ip = 0;
    foreach (ref_bf[i]) ref_bf[i] = 0;
    loaded = 0;
    targets = '{10, 100, 1000};
    pfp = '{9.31e-8, 9.28e-6, 9.03e-4};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (bf_ready);
    foreach (targets[t]) begin
      int exp_cap, cap0, s0;
      longint w0;
      real rate, cyc0;
      while (loaded < targets[t]) begin
        logic [31:0] ip;
        ip = $urandom;
        usr(USR_ADD_IP, ip);
        ref_bf[ref_h1(ip, 16)] = 1;
        ref_bf[ref_h2(ip, 16)] = 1;
        sus.push_back(ip);
        loaded++;
      end
      do quiet_src = $urandom; while (ref_test(quiet_src));
      // every suspect must be caught
      cap0 = captured;
      foreach (sus[i]) if (i < 50) send(quiet_src, sus[$urandom_range(0, sus.size() - 1)]);
      drain();
      chk(captured - cap0 == (sus.size() < 50 ? sus.size() : 50), "all suspect packets captured");
      // random destinations
      cap0 = captured; exp_cap = 0; w0 = in_words; cyc0 = $realtime;
      for (int i = 0; i < M; i++) begin
        logic [31:0] dip;
        dip = $urandom;
        if (ref_test(dip)) exp_cap++;
        send(quiet_src, dip);
      end
      drain();
      rate = real'(captured - cap0) / M;
      $display("n=%0d: %0d of %0d random packets captured (rate %e, formula %e); %0.2f Gbit/s accepted",
               targets[t], captured - cap0, M, rate, pfp[t],
               64.0 * (in_words - w0) / (($realtime - cyc0) / 8.0) * 0.125);
      chk(captured - cap0 == exp_cap, "captured count equals the reference prediction");
      if (t == 2) chk(rate > 0.6 * pfp[t] && rate < 1.4 * pfp[t], "false-positive rate near the formula");
      else        chk(captured - cap0 <= 10, "few false positives");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
