// tb_usbi: drives the user-space request/response port of the USBI, with
// the real Bloom filter behind it, and checks every operation against a
// reference bit array built with independent hash functions:
// READ/WRITE round trips, ADD_IP setting exactly the two hash bits,
// TEST_IP for added and random addresses, and that the user's request stays
// unanswered while Inspector queries hold the filter busy.
module tb_usbi;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 65536, WW = 32, DEPTH = N / WW, AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, ready;
  logic usr_req, usr_ack, usr_hit;
  usr_op_e usr_op;
  logic [AW-1:0] usr_addr;
  logic [WW-1:0] usr_wdata, usr_rdata;
  logic [31:0] usr_ip;
  logic lp_req, lp_we, lp_ack;
  logic [AW-1:0] lp_addr;
  logic [WW-1:0] lp_wdata, lp_rdata;
  logic hp_req, hp_valid, hp_hit;
  logic [31:0] hp_ip;
  logic [WW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  usbi #(.N_BITS(N), .WORD_W(WW)) dut (.*);
  bloom_filter #(.N_BITS(N), .WORD_W(WW)) u_bf (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic usr(usr_op_e op, int addr, logic [WW-1:0] wd, logic [31:0] ip, output int cyc);
    @(negedge clk);
    usr_req = 1; usr_op = op; usr_addr = AW'(addr); usr_wdata = wd; usr_ip = ip;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!usr_ack);
    @(negedge clk);
    usr_req = 0;
  endtask

  function automatic bit ref_bit(int idx);
    return ref_mem[idx / WW][idx % WW];
  endfunction

  initial begin
    int cyc, a;
    logic [WW-1:0] v;
    logic [31:0] ips[16];
    usr_req = 0; usr_op = USR_READ; usr_addr = 0; usr_wdata = 0; usr_ip = 0;
    hp_req = 0; hp_ip = 0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    // READ / WRITE
    for (int i = 0; i < 30; i++) begin
      a = $urandom_range(0, DEPTH - 1); v = $urandom;
      usr(USR_WRITE, a, v, 0, cyc); ref_mem[a] = v;
      usr(USR_READ, a, 0, 0, cyc);
      chk(usr_rdata == v, "write/read round trip");
    end
    // clear what was written
    for (int i = 0; i < DEPTH; i++) if (ref_mem[i] != 0) begin
      usr(USR_WRITE, i, 0, 0, cyc); ref_mem[i] = 0;
    end
    // ADD_IP
    foreach (ips[i]) begin
      int h1, h2;
      ips[i] = $urandom;
      h1 = ref_h1(ips[i], 16); h2 = ref_h2(ips[i], 16);
      usr(USR_ADD_IP, 0, 0, ips[i], cyc);
      ref_mem[h1 / WW][h1 % WW] = 1'b1;
      ref_mem[h2 / WW][h2 % WW] = 1'b1;
      usr(USR_READ, h1 / WW, 0, 0, cyc);
      chk(usr_rdata == ref_mem[h1 / WW], "ADD_IP word of h1");
      usr(USR_READ, h2 / WW, 0, 0, cyc);
      chk(usr_rdata == ref_mem[h2 / WW], "ADD_IP word of h2");
    end
    // TEST_IP
    foreach (ips[i]) begin
      usr(USR_TEST_IP, 0, 0, ips[i], cyc);
      chk(usr_hit, "added address tests positive");
    end
    for (int i = 0; i < 100; i++) begin
      logic [31:0] ip;
      ip = $urandom;
      usr(USR_TEST_IP, 0, 0, ip, cyc);
      chk(usr_hit == (ref_bit(ref_h1(ip, 16)) && ref_bit(ref_h2(ip, 16))), "random address test");
    end
    // Inspector priority: queries keep the filter busy for 40 cycles
    fork
      begin
        @(negedge clk);
        hp_req = 1; hp_ip = ips[0];
        repeat (40) @(negedge clk);
        hp_req = 0;
      end
      begin
        usr(USR_READ, 5, 0, 0, cyc);
      end
    join
    chk(cyc > 40, $sformatf("user read delayed by inspector queries (%0d cycles)", cyc));
    usr(USR_READ, 5, 0, 0, cyc);
    chk(cyc <= 5, $sformatf("user read fast when idle (%0d cycles)", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
