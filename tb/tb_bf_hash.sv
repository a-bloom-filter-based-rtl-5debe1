// tb_bf_hash: checks the two Fibonacci hash functions against hand-worked
// values and against an independent 64-bit reference over random addresses.
module tb_bf_hash;
  import tb_util_pkg::*;

  logic [31:0] ip;
  logic [15:0] h1, h2;
  logic [9:0]  s1, s2;
  int checks = 0, failures = 0;

  bf_hash #(.IDX_W(16)) dut  (.ip(ip), .h1(h1), .h2(h2));
  bf_hash #(.IDX_W(10)) dut_s(.ip(ip), .h1(s1), .h2(s2));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ip=%h h1=%h h2=%h", what, ip, h1, h2); end
  endtask

  initial begin
    // 1 * 0x9E3779B9 -> top 16 bits 0x9E37; reversed 1 = 0x80000000, times an odd
    // constant keeps 0x80000000 -> 0x8000.
    ip = 32'h0000_0001; #1;
    chk(h1 == 16'h9E37 && h2 == 16'h8000, "ip=1");
    ip = 32'h0000_0000; #1;
    chk(h1 == 16'h0000 && h2 == 16'h0000, "ip=0");
    // 2 * 0x9E3779B9 = 0x13C6EF372 -> 0x3C6E; reversed 2 = 0x40000000 -> 0x4000
    ip = 32'h0000_0002; #1;
    chk(h1 == 16'h3C6E && h2 == 16'h4000, "ip=2");
    for (int i = 0; i < 2000; i++) begin
      ip = $urandom; #1;
      chk(int'(h1) == ref_h1(ip, 16), "h1 random");
      chk(int'(h2) == ref_h2(ip, 16), "h2 random");
      chk(int'(s1) == ref_h1(ip, 10) && int'(s2) == ref_h2(ip, 10), "10-bit index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
