// tb_out_gate: streams packets through a model Output FIFO (with random
// gaps) and hands out decisions after random delays, with random
// back-pressure on the output. Checks the emitted stream word by word:
// rewritten destination bits in each header, bodies unchanged, dropped
// packets absent, nothing emitted for a packet before its decision, the
// drain of dropped packets, and the per-packet pulses.
module tb_out_gate;
  import bi_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_word_t of_dout;
  logic of_empty, of_rd, dec_valid, dec_ready, out_wr, out_rdy, pkt_out, pkt_drop;
  logic [7:0] dec_dst, out_ctrl;
  logic [63:0] out_data;

  bus_word_t src[$], exp_q[$];
  logic [7:0] decs[$];
  int rd_idx = 0, dec_idx = 0, exp_idx = 0;
  int checks = 0, failures = 0, n_out = 0, n_drop = 0, n_pulse_out = 0, n_pulse_drop = 0;
  int n_hold = 0;
  bit gap;

  out_gate dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  assign of_dout  = rd_idx < src.size() ? src[rd_idx] : '0;
  assign of_empty = rd_idx >= src.size() || gap;

  always @(negedge clk) begin
    gap     <= ($urandom_range(0, 7) == 0);
    out_rdy <= ($urandom_range(0, 4) != 0);
  end

  // decisions become valid after a random delay per packet
  int dly = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_ready) begin
      dec_idx <= dec_idx + 1;
      dly <= $urandom_range(0, 6);
      dec_valid <= 1'b0;
    end else if (dec_idx < decs.size()) begin
      if (dly > 0) dly <= dly - 1;
      else dec_valid <= 1'b1;
    end
    // the header waits at the FIFO head until the decision
    if (!of_empty && !dec_valid && of_dout.ctrl == IOQ_HDR_CTRL) n_hold++;
    if (of_rd) rd_idx <= rd_idx + 1;
    if (pkt_out) n_pulse_out++;
    if (pkt_drop) n_pulse_drop++;
    if (out_wr) begin
      chk(exp_idx < exp_q.size() && {out_ctrl, out_data} == exp_q[exp_idx], "output word");
      exp_idx <= exp_idx + 1;
    end
  end
  assign dec_dst = dec_idx < decs.size() ? decs[dec_idx] : 8'h00;

  initial begin
    gap = 0; out_rdy = 1; dec_valid = 0;
    for (int k = 0; k < 300; k++) begin
      pkt_t p;
      logic [7:0] d;
      p = make_pkt($urandom_range(0, 7), $urandom_range(40, 300), ETHERTYPE_IPV4, $urandom, $urandom);
      d = ($urandom_range(0, 2) == 0) ? 8'h00 : 8'($urandom_range(1, 255));
      decs.push_back(d);
      foreach (p[i]) src.push_back(p[i]);
      if (d != 8'h00) begin
        p[0].data[63:48] = {8'h00, d};
        foreach (p[i]) exp_q.push_back(p[i]);
        n_out++;
      end else n_drop++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rd_idx == src.size());
    repeat (5) @(posedge clk);
    chk(exp_idx == exp_q.size(), "all expected words emitted");
    chk(n_pulse_out == n_out && n_pulse_drop == n_drop, "per-packet pulses");
    chk(n_drop > 0 && n_out > 0 && n_hold > 0, "drops, forwards and held headers all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
