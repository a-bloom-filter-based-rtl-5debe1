// packet_buffer: copies packets from the Input FIFO to the Output FIFO and
// keeps the first words of each packet for the Inspector.
//
// Every word popped from the Input FIFO is pushed into the Output FIFO in the
// same cycle; the first BUF_WORDS words of a packet (its module header and
// the start of the frame) are also stored in a small register buffer. The
// buffer holds one packet at a time: when it is full (or the packet ended)
// `buf_valid` rises, and it stays valid until the Inspector pulses
// `buf_release`. If the next packet's first word arrives while the buffer is
// still taken, the copy stalls (`stall` is high) until the release; the
// release and the new packet's first word may meet in the same cycle.
// Words of the current packet beyond BUF_WORDS never stall here.
// Packet framing: the first word of a packet is its single module header;
// the packet ends with the first later word whose ctrl is non-zero.
// BUF_WORDS = 6 is the smallest buffer that reaches the destination address
// of an IPv4 header behind a 14-byte Ethernet header; the copy-while-storing
// behaviour follows the design, the size and stall rule are this design's.
module packet_buffer #(
  parameter int unsigned BUF_WORDS = 6,
  localparam int unsigned BAW = $clog2(BUF_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the Input FIFO
  input  bi_pkg::bus_word_t  in_word,
  input  logic               in_empty,
  output logic               in_rd,
  // to the Output FIFO
  output bi_pkg::bus_word_t  of_din,
  output logic               of_wr,
  input  logic               of_full,
  // to the Inspector
  output logic               buf_valid,
  output logic [BAW:0]       buf_len,
  input  logic [BAW-1:0]     rd_addr,
  output bi_pkg::bus_word_t  rd_data,
  input  logic               buf_release,
  output logic               stall
);
  import bi_pkg::*;

  bus_word_t    buf_q [BUF_WORDS];
  logic         at_sop;     // next word is the first of a packet
  logic         buf_busy;   // buffer owned by a packet not yet released
  logic         buf_done;   // all words the buffer will get are in
  logic [BAW:0] wcnt;
  logic         move;

  assign stall   = !in_empty && at_sop && buf_busy && !buf_release;
  assign move    = !in_empty && !of_full && !stall;
  assign in_rd   = move;
  assign of_wr   = move;
  assign of_din  = in_word;
  assign rd_data = buf_q[rd_addr];
  assign buf_valid = buf_busy && buf_done;
  assign buf_len   = wcnt;

  logic is_eop;
  assign is_eop = !at_sop && (in_word.ctrl != '0);

  always_ff @(posedge clk) begin
    if (move) begin
      if (at_sop) buf_q[0] <= in_word;
      else if (wcnt < (BAW+1)'(BUF_WORDS)) buf_q[wcnt[BAW-1:0]] <= in_word;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      at_sop   <= 1'b1;
      buf_busy <= 1'b0;
      buf_done <= 1'b0;
      wcnt     <= '0;
    end else begin
      if (buf_release) buf_busy <= 1'b0;
      if (move) begin
        if (at_sop) begin
          at_sop   <= 1'b0;
          buf_busy <= 1'b1;
          buf_done <= (BUF_WORDS == 1);
          wcnt     <= (BAW+1)'(1);
        end else begin
          if (wcnt < (BAW+1)'(BUF_WORDS)) begin
            wcnt <= wcnt + 1'b1;
            if (wcnt == (BAW+1)'(BUF_WORDS - 1)) buf_done <= 1'b1;
          end
          if (is_eop) begin
            at_sop   <= 1'b1;
            buf_done <= 1'b1;
          end
        end
      end
    end
  end

  a_release_valid: assert property (@(posedge clk) disable iff (!rst_n)
    buf_release |-> buf_valid);
endmodule
