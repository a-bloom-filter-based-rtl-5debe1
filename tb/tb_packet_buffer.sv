// tb_packet_buffer: feeds packets of random sizes (including ones shorter
// than the buffer) with random gaps and random Output-FIFO back-pressure.
// Checks that every word reaches the Output FIFO side unchanged and in
// order, that the buffer holds exactly the first words of each packet with
// the right length, that no packet starts while the previous one is still
// unreleased, and that the stall actually occurs.
module tb_packet_buffer;
  import bi_pkg::*;
  import tb_util_pkg::*;
  localparam int BW = 6, BAW = $clog2(BW);

  logic clk = 0, rst_n = 0;
  bus_word_t in_word, of_din, rd_data;
  logic in_empty, in_rd, of_wr, of_full, buf_valid, buf_release, stall;
  logic [BAW:0] buf_len;
  logic [BAW-1:0] rd_addr;

  bus_word_t src[$], exp_out[$];
  pkt_t pkts[$], moved[$], empty_pkt;
  int checks = 0, failures = 0, n_stall = 0, n_short = 0, started = 0, released = 0;
  bit gap;

  packet_buffer #(.BUF_WORDS(BW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int rd_idx = 0, wr_idx = 0;
  assign in_word  = rd_idx < src.size() ? src[rd_idx] : '0;
  assign in_empty = rd_idx >= src.size() || gap;

  // source, sink and random stimulus
  always @(negedge clk) begin
    gap     <= ($urandom_range(0, 9) == 0);
    of_full <= ($urandom_range(0, 9) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (buf_release) released++;
    if (in_rd) begin
      if (src[rd_idx].ctrl == IOQ_HDR_CTRL) begin
        chk(started == released, "new packet only after release");
        started++;
        moved.push_back(empty_pkt);
      end
      moved[moved.size()-1].push_back(src[rd_idx]);
      rd_idx <= rd_idx + 1;
    end
    if (of_wr) begin
      chk(wr_idx < exp_out.size() && of_din == exp_out[wr_idx], "word copied to Output FIFO");
      wr_idx <= wr_idx + 1;
    end
  end

  // Inspector stand-in: check the buffer, release after a random delay
  initial begin
    buf_release = 0; rd_addr = 0;
    @(posedge rst_n);
    forever begin
      pkt_t p;
      int n;
      @(negedge clk);
      if (buf_valid) begin
        p = pkts.pop_front();
        chk(moved.size() == released + 1, "buffer holds the oldest unreleased packet");
        // the buffer must equal what actually entered for this packet
        for (int i = 0; i < moved[released].size() && i < p.size(); i++)
          chk(moved[released][i] == p[i], "entered words match the source");
        n = p.size() < BW ? p.size() : BW;
        if (p.size() < BW) n_short++;
        chk(int'(buf_len) == n, "buffer length");
        for (int i = 0; i < n; i++) begin
          rd_addr = BAW'(i); #1;
          chk(rd_data == p[i], $sformatf("buffer word %0d", i));
        end
        @(negedge clk);  // realign after the reads
        repeat ($urandom_range(0, 12)) @(negedge clk);
        chk(buf_valid, "stays valid until released");
        buf_release = 1;
        @(negedge clk);
        buf_release = 0;
      end
    end
  end

  initial begin
    gap = 0; of_full = 0;
    for (int k = 0; k < 300; k++) begin
      pkt_t p;
      int len;
      len = (k % 7 == 3) ? $urandom_range(2, 3) * 8 : $urandom_range(14, 200);
      p = make_pkt($urandom_range(0, 7), len, 16'h0800, $urandom, $urandom);
      if (k % 7 == 3) while (p.size() > 4) void'(p.pop_back());  // very short
      if (k % 7 == 3) p[p.size()-1].ctrl = 8'h01;
      pkts.push_back(p);
      foreach (p[i]) begin src.push_back(p[i]); exp_out.push_back(p[i]); end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (wr_idx == exp_out.size());
    repeat (40) @(posedge clk);
    chk(released == 300, $sformatf("all packets inspected (%0d)", released));
    chk(n_stall > 0, $sformatf("stall happened (%0d cycles)", n_stall));
    chk(n_short > 0, "short packets seen");
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
