// tb_pkt_fifo: random push/pop traffic against a queue scoreboard. Checks
// the head word, the empty/full flags and the fill count every cycle, and
// drives the FIFO into both full and empty.
module tb_pkt_fifo;
  localparam int W = 72, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D):0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, cycles = 0, n_full = 0, n_empty = 0;

  pkt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycles); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      cycles++;
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      chk(int'(count) == model.size(), "count");
      if (model.size() > 0) chk(dout == model[0], "head word");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases bias towards filling and towards draining
      wr_en = !full && ($urandom_range(0, 99) < (((c / 500) % 2) != 0 ? 30 : 75));
      rd_en = !empty && ($urandom_range(0, 99) < (((c / 500) % 2) != 0 ? 75 : 30));
      din = {$urandom, $urandom, 8'($urandom)};
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(din);
    end
    chk(n_full > 0 && n_empty > 0, "reached full and empty");
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
