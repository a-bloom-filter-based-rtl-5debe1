// tb_bloom_filter: checks the bit array and its priority controller at the
// full 65536-bit size.
// - after reset the array is cleared (every query misses, every word reads 0)
//   and `ready` rises after exactly N_BITS/WORD_W cycles;
// - words written through the low-priority port read back unchanged;
// - a query hits only when both of its hash bits are set (reference hashes);
// - queries answer one cycle later, back to back;
// - a low-priority request is held off for as long as queries keep coming
//   and is served in the first free cycle.
module tb_bloom_filter;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 65536, WW = 32, DEPTH = N / WW, AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, ready;
  logic hp_req, hp_valid, hp_hit;
  logic [31:0] hp_ip;
  logic lp_req, lp_we, lp_ack;
  logic [AW-1:0] lp_addr;
  logic [WW-1:0] lp_wdata, lp_rdata;
  logic [WW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  bloom_filter #(.N_BITS(N), .WORD_W(WW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic lp_access(bit we, int addr, logic [WW-1:0] wd, output logic [WW-1:0] rd);
    @(negedge clk);
    lp_req = 1; lp_we = we; lp_addr = AW'(addr); lp_wdata = wd;
    do @(posedge clk); while (!lp_ack);
    rd = lp_rdata;
    @(negedge clk);
    lp_req = 0; lp_we = 0;
    if (we) ref_mem[addr] = wd;
  endtask

  function automatic bit ref_hit(logic [31:0] ip);
    int a = ref_h1(ip, 16), b = ref_h2(ip, 16);
    return ref_mem[a / WW][a % WW] && ref_mem[b / WW][b % WW];
  endfunction

  task automatic set_ip(logic [31:0] ip, bit only_h1);
    logic [WW-1:0] rd;
    int a = ref_h1(ip, 16), b = ref_h2(ip, 16);
    lp_access(1, a / WW, ref_mem[a / WW] | (WW'(1) << (a % WW)), rd);
    if (!only_h1) lp_access(1, b / WW, ref_mem[b / WW] | (WW'(1) << (b % WW)), rd);
  endtask

  // one query, result checked against the reference array
  task automatic query(logic [31:0] ip, string what);
    @(negedge clk);
    hp_req = 1; hp_ip = ip;
    @(negedge clk);
    hp_req = 0;
    chk(hp_valid, {what, ": valid one cycle later"});
    chk(hp_hit == ref_hit(ip), {what, ": hit"});
  endtask

  initial begin
    logic [WW-1:0] rd;
    logic [31:0] ips[8];
    int t0, wait_cyc;
    hp_req = 0; hp_ip = 0; lp_req = 0; lp_we = 0; lp_addr = 0; lp_wdata = 0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    t0 = 0;
    while (!ready) begin @(posedge clk); t0++; end
    chk(t0 == DEPTH, $sformatf("clear takes DEPTH cycles (%0d)", t0));
    // cleared
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      lp_access(0, a, '0, rd);
      chk(rd == '0, "cleared word");
    end
    for (int i = 0; i < 20; i++) query($urandom, "empty filter");
    // word write / read-back
    for (int i = 0; i < 20; i++) begin
      int a;
      logic [WW-1:0] v;
      a = $urandom_range(0, DEPTH - 1);
      v = $urandom;
      lp_access(1, a, v, rd);
      lp_access(0, a, '0, rd);
      chk(rd == v, "read back");
    end
    // program addresses, one only half-set
    foreach (ips[i]) begin ips[i] = $urandom; set_ip(ips[i], i == 7); end
    for (int i = 0; i < 7; i++) begin
      query(ips[i], "programmed");
      chk(hp_hit, "programmed address hits");
    end
    query(ips[7], "half programmed");
    for (int i = 0; i < 200; i++) query($urandom, "random");
    // back-to-back queries
    @(negedge clk); hp_req = 1; hp_ip = ips[0];
    @(negedge clk); hp_ip = ips[1];
    chk(hp_valid && hp_hit, "b2b first");
    @(negedge clk); hp_req = 0;
    chk(hp_valid && hp_hit, "b2b second");
    // priority: queries for 10 cycles while a read is pending
    @(negedge clk);
    hp_req = 1; hp_ip = ips[2];
    lp_req = 1; lp_we = 0; lp_addr = AW'(ref_h1(ips[2], 16) / WW);
    wait_cyc = 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      chk(!lp_ack, "low priority held off");
      chk(hp_valid && hp_hit, "queries served under contention");
    end
    hp_req = 0;
    @(negedge clk);  // granted at the edge just passed
    chk(lp_ack, "low priority served in first free cycle");
    chk(lp_rdata == ref_mem[ref_h1(ips[2], 16) / WW], "held-off read data");
    lp_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
