// tb_bloom_inspector: end-to-end test of the traffic inspector at its
// default (full) size: a 65536-bit Bloom filter with k = 2 hashes.
//
// 1. Waits for the filter to clear, then loads suspect addresses through
//    the user-space port (ADD_IP) while a reference bit array is built with
//    independent hash functions.
// 2. Checks the 14-cycle latency of a lone packet's header through the
//    empty module (input write to output write). Then sends mixed traffic (IPv4 with suspect source or destination, IPv4
//    from other hosts, non-IPv4, packet sizes 60..1500 bytes from all eight
//    ports) in Forward and Tap mode, then in Tap and Drop mode, with random
//    input gaps and output back-pressure, while user-space reads and tests
//    run concurrently. Every output word is compared with the expected
//    stream: packets in order, header destination bits rewritten, dropped
//    packets absent.
// 3. Throughput: back-to-back traffic of 256, 512 and 1500-byte packets from
//    the four MAC ports, each addressed to one of four trained destination
//    addresses, in Tap and Drop mode with the output always ready; the
//    accepted input rate must be at least 4 Gbit/s at 125 MHz (half a
//    64-bit word per cycle).
// Each mechanism (tap, forward, drop, non-IPv4, buffer stall, user access
// held off by the Inspector, input and output back-pressure, mode switch)
// is counted and must occur at least once.
module tb_bloom_inspector;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 65536, WW = 32, AW = $clog2(N / WW);

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
  always #4 clk = ~clk;   // 125 MHz

  int checks = 0, failures = 0;
  bit ref_bf [N];
  bus_word_t src[$], exp_q[$];
  int rd_idx = 0, exp_idx = 0;
  int gap_pct = 0, rdy_pct = 100;
  bit traffic_on = 0;
  // mechanism counters
  int n_tap = 0, n_fwd = 0, n_drop = 0, n_nonip = 0, n_stall = 0, n_usr_wait = 0;
  int n_in_bp = 0, n_out_bp = 0, n_mode_sw = 0, n_usr_ops = 0;
  int n_in_words = 0;
  int cyc_cnt = 0, t_hdr_in = 0, last_lat = -1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic bit ref_test(logic [31:0] ip);
    return ref_bf[ref_h1(ip, 16)] && ref_bf[ref_h2(ip, 16)];
  endfunction

  // input driver: one word per cycle when allowed
  always @(negedge clk) begin
    in_wr = 0;
    if (rst_n && rd_idx < src.size() && ($urandom_range(0, 99) >= gap_pct)) begin
      if (in_rdy) begin
        in_wr = 1;
        {in_ctrl, in_data} = src[rd_idx];
      end else n_in_bp++;
    end
    out_rdy = ($urandom_range(0, 99) < rdy_pct);
  end

  always @(posedge clk) begin
    cyc_cnt++;
    if (in_wr && in_ctrl == IOQ_HDR_CTRL) t_hdr_in = cyc_cnt;
    if (out_wr && out_ctrl == IOQ_HDR_CTRL) last_lat = cyc_cnt - t_hdr_in;
    if (in_wr) begin rd_idx <= rd_idx + 1; n_in_words++; end
    if (out_wr) begin
      chk(exp_idx < exp_q.size() && {out_ctrl, out_data} == exp_q[exp_idx], "output word");
      exp_idx <= exp_idx + 1;
    end
    if (!out_rdy && !dut.ofifo_empty) n_out_bp++;
    if (dut.pb_stall) n_stall++;
    if (dut.lp_req && dut.hp_req) n_usr_wait++;
  end

  // queue one packet and its expected output
  task automatic send(li_mode_e m, int sp, int len, bit ip4, logic [31:0] sip, logic [31:0] dip);
    pkt_t p;
    bit hit;
    logic [7:0] d;
    p = make_pkt(sp, len, ip4 ? ETHERTYPE_IPV4 : 16'h0806, sip, dip);
    hit = ip4 && (ref_test(sip) || ref_test(dip));
    d = ref_ports(m, sp, hit);
    if (!ip4) n_nonip++;
    if (hit) n_tap++;
    else if (d != 0) n_fwd++;
    else n_drop++;
    foreach (p[i]) src.push_back(p[i]);
    if (d != 0) begin
      p[0].data[63:48] = {8'h00, d};
      foreach (p[i]) exp_q.push_back(p[i]);
    end
  endtask

  task automatic usr(usr_op_e op, int addr, logic [31:0] ip);
    @(negedge clk);
    usr_req = 1; usr_op = op; usr_addr = AW'(addr); usr_ip = ip; usr_wdata = '0;
    do @(posedge clk); while (!usr_ack);
    @(negedge clk);
    usr_req = 0;
    n_usr_ops++;
  endtask

  task automatic drain();
    wait (rd_idx == src.size());
    wait (exp_idx == exp_q.size());
    repeat (50) @(posedge clk);
    chk(exp_idx == exp_q.size(), "no extra output");
  endtask

  logic [31:0] sus[8];

  task automatic mixed_batch(li_mode_e m, int npkts);
    for (int k = 0; k < npkts; k++) begin
      int kind, sp, len;
      logic [31:0] sip, dip;
      kind = $urandom_range(0, 9);
      sp   = $urandom_range(0, 7);
      len  = (k % 5 == 0) ? 1500 : $urandom_range(60, 600);
      sip  = (kind == 1) ? sus[$urandom_range(0, 7)] : $urandom;
      dip  = (kind == 2 || kind == 3) ? sus[$urandom_range(0, 7)] : $urandom;
      send(m, sp, len, kind != 4, sip, dip);
    end
  endtask

  initial begin
    longint t0;
    int words0, cyc;
    mode = MODE_FWD_TAP; in_wr = 0; in_ctrl = 0; in_data = 0; out_rdy = 1;
    usr_req = 0; usr_op = USR_READ; usr_addr = 0; usr_wdata = 0; usr_ip = 0;
    foreach (ref_bf[i]) ref_bf[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (bf_ready);
    // load suspects
    foreach (sus[i]) begin
      sus[i] = $urandom;
      usr(USR_ADD_IP, 0, sus[i]);
      ref_bf[ref_h1(sus[i], 16)] = 1;
      ref_bf[ref_h2(sus[i], 16)] = 1;
    end
    foreach (sus[i]) begin usr(USR_TEST_IP, 0, sus[i]); chk(usr_hit, "suspect loaded"); end

    // latency of a lone packet through an empty module, output ready
    gap_pct = 0; rdy_pct = 100;
    send(MODE_FWD_TAP, 0, 256, 1, sus[0], $urandom);
    drain();
    chk(last_lat == 14, $sformatf("header latency 14 cycles (got %0d)", last_lat));

    // Forward and Tap, with gaps and back-pressure, user traffic alongside
    gap_pct = 20; rdy_pct = 70;
    mode = MODE_FWD_TAP;
    mixed_batch(MODE_FWD_TAP, 150);
    fork
      drain();
      repeat (200) begin
        logic [31:0] ip;
        ip = $urandom;
        usr(USR_TEST_IP, 0, ip);
        chk(usr_hit == ref_test(ip), "user test during traffic");
      end
    join

    // switch mode between packets
    mode = MODE_TAP_DROP; n_mode_sw++;
    gap_pct = 0; rdy_pct = 50;
    mixed_batch(MODE_TAP_DROP, 150);
    fork
      drain();
      repeat (100) usr(USR_READ, $urandom_range(0, N / WW - 1), 0);
    join

    // throughput, Tap and Drop, four trained destinations
    gap_pct = 0; rdy_pct = 100;
    begin
      int sizes[3];
      sizes = '{256, 512, 1500};
      foreach (sizes[s]) begin
        @(negedge clk);
        t0 = longint'($time); words0 = n_in_words;
        for (int k = 0; k < 40; k++) begin
          int sp;
          sp = 2 * (k % 4);   // MAC ports 0..3
          send(MODE_TAP_DROP, sp, sizes[s], 1, $urandom, sus[k % 4]);
        end
        wait (rd_idx == src.size());
        cyc = int'((longint'($time) - t0) / 8);
        $display("size %0d: %0d words in %0d cycles = %0.2f Gbit/s at 125 MHz", sizes[s],
                 n_in_words - words0, cyc, 8.0 * (n_in_words - words0) / cyc);
        chk(2 * (n_in_words - words0) >= cyc, $sformatf("at least 4 Gbit/s with %0d-byte packets", sizes[s]));
        drain();
      end
    end

    $display("tap=%0d fwd=%0d drop=%0d nonip=%0d stall=%0d usr_wait=%0d in_bp=%0d out_bp=%0d mode_sw=%0d",
             n_tap, n_fwd, n_drop, n_nonip, n_stall, n_usr_wait, n_in_bp, n_out_bp, n_mode_sw);
    chk(n_tap > 0, "tap happened");
    chk(n_fwd > 0, "plain forward happened");
    chk(n_drop > 0, "drop happened");
    chk(n_nonip > 0, "non-IPv4 packet seen");
    chk(n_stall > 0, "packet buffer stall happened");
    chk(n_usr_wait > 0, "user access held off by the inspector");
    chk(n_in_bp > 0, "input back-pressure happened");
    chk(n_out_bp > 0, "output back-pressure happened");
    chk(n_mode_sw > 0, "mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
