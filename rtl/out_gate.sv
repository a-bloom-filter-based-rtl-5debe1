// out_gate: output stage of the traffic inspector.
//
// Holds the first word (module header) of the packet at the Output FIFO head
// until the Inspector's decision for it is ready, then rewrites the header's
// destination-port bits [63:48] with the decision and lets the header go.
// The remaining words of the packet follow without further checks, one per
// cycle while `out_rdy` is high. A packet whose decision selects no port at
// all (Tap and Drop, no match) is discarded here: its words are drained from
// the Output FIFO without being written out.
// Output handshake: `out_wr` is only asserted in a cycle where `out_rdy` is
// high. `pkt_out`/`pkt_drop` pulse once per forwarded/discarded packet.
// Holding the header and marking the packet through its header bits follow
// the design; discarding inside the module is this design's choice.
module out_gate (
  input  logic               clk,
  input  logic               rst_n,
  // Output FIFO
  input  bi_pkg::bus_word_t  of_dout,
  input  logic               of_empty,
  output logic               of_rd,
  // decision from the Inspector
  input  logic               dec_valid,
  input  logic [7:0]         dec_dst,
  output logic               dec_ready,
  // module output
  output logic [63:0]        out_data,
  output logic [7:0]         out_ctrl,
  output logic               out_wr,
  input  logic               out_rdy,
  output logic               pkt_out,
  output logic               pkt_drop
);
  import bi_pkg::*;

  logic in_body;   // header gone, words of the packet still flowing
  logic drop_q;    // current packet is being discarded
  logic drop_now;

  assign drop_now = (dec_dst == 8'h00);

  always_comb begin
    of_rd     = 1'b0;
    dec_ready = 1'b0;
    out_wr    = 1'b0;
    out_data  = of_dout.data;
    out_ctrl  = of_dout.ctrl;
    pkt_out   = 1'b0;
    pkt_drop  = 1'b0;
    if (!in_body) begin
      if (!of_empty && dec_valid && (out_rdy || drop_now)) begin
        of_rd     = 1'b1;
        dec_ready = 1'b1;
        out_wr    = !drop_now;
        out_data[HDR_DST_LSB +: 16] = {8'h00, dec_dst};
        pkt_out   = !drop_now;
        pkt_drop  = drop_now;
      end
    end else if (!of_empty && (out_rdy || drop_q)) begin
      of_rd  = 1'b1;
      out_wr = !drop_q;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_body <= 1'b0;
      drop_q  <= 1'b0;
    end else if (of_rd) begin
      if (!in_body) begin
        in_body <= 1'b1;
        drop_q  <= drop_now;
      end else if (of_dout.ctrl != '0) begin
        in_body <= 1'b0;
      end
    end
  end

  a_wr_rdy: assert property (@(posedge clk) disable iff (!rst_n) out_wr |-> out_rdy);
endmodule
