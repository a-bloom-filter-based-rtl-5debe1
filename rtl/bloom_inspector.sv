// bloom_inspector: Bloom filter traffic inspection module for a lawful
// interception monitoring station.
//
// It takes the place of the output-port lookup stage of a NetFPGA-style
// 8-port packet pipeline (4 Gigabit MAC ports, 4 host DMA ports, 64-bit words
// at 125 MHz). Every packet is classified by checking its IPv4 source and
// destination addresses against a Bloom filter loaded with the addresses of
// the suspects under a warrant; the outcome is written into the
// destination-port bits of the packet's module header, which tell the output
// queues where the packet goes.
//
// Data path (input to output):
//   Input FIFO -> Packet Buffer (copies every word on to the Output FIFO and
//   keeps the first BUF_WORDS words) -> Inspector (reads the addresses,
//   queries the Bloom filter twice) -> output stage (holds the packet's
//   header at the Output FIFO head until the decision, rewrites it, then
//   streams the rest of the packet).
// Control path: the USBI lets host software read, write and add entries of
// the Bloom filter at low priority; the Inspector always has priority.
//
// Interface: `in_*` is the packet bus from the input arbiter (`in_wr` may only
// be high while `in_rdy` is high); `out_*` goes to the output queues
// (`out_wr` only while `out_rdy`). `mode` selects Forward and Tap or Tap and
// Drop (sampled per packet). `usr_*` is the USBI's request/response port.
// `bf_ready` rises once the Bloom filter has been cleared after reset
// (N_BITS/WORD_W cycles); packets are accepted but not classified before.
// Latency of an IPv4 packet through an empty module with the output ready:
// its header leaves 14 cycles after it was written in (6 cycles to fill the
// buffer, 7 to decide, 1 through the Input FIFO); the rest of the packet
// follows at one word per cycle.
module bloom_inspector #(
  parameter int unsigned N_BITS     = 65536,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned BUF_WORDS  = 6,
  localparam int unsigned AW  = $clog2(N_BITS / WORD_W),
  localparam int unsigned BAW = $clog2(BUF_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bi_pkg::li_mode_e  mode,
  output logic              bf_ready,
  // packet bus in
  input  logic [63:0]       in_data,
  input  logic [7:0]        in_ctrl,
  input  logic              in_wr,
  output logic              in_rdy,
  // packet bus out
  output logic [63:0]       out_data,
  output logic [7:0]        out_ctrl,
  output logic              out_wr,
  input  logic              out_rdy,
  // user-space port (USBI)
  input  logic              usr_req,
  input  bi_pkg::usr_op_e   usr_op,
  input  logic [AW-1:0]     usr_addr,
  input  logic [WORD_W-1:0] usr_wdata,
  input  logic [31:0]       usr_ip,
  output logic              usr_ack,
  output logic [WORD_W-1:0] usr_rdata,
  output logic              usr_hit
);
  import bi_pkg::*;

  localparam int unsigned FW = $bits(bus_word_t);

  // Input FIFO
  bus_word_t ififo_din, ififo_dout;
  logic      ififo_full, ififo_empty, ififo_rd;
  logic [$clog2(FIFO_DEPTH):0] ififo_count;
  assign ififo_din = '{ctrl: in_ctrl, data: in_data};
  assign in_rdy    = !ififo_full;

  pkt_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(in_wr), .din(ififo_din), .full(ififo_full),
    .rd_en(ififo_rd), .dout(ififo_dout), .empty(ififo_empty),
    .count(ififo_count));

  // Packet Buffer, feeding the Output FIFO
  bus_word_t ofifo_din, ofifo_dout;
  logic      ofifo_wr, ofifo_full, ofifo_empty, ofifo_rd;
  logic [$clog2(FIFO_DEPTH):0] ofifo_count;
  logic      buf_valid, buf_release, pb_stall;
  logic [BAW:0]   buf_len;
  logic [BAW-1:0] buf_addr;
  bus_word_t buf_data;

  packet_buffer #(.BUF_WORDS(BUF_WORDS)) u_pkt_buf (
    .clk, .rst_n,
    .in_word(ififo_dout), .in_empty(ififo_empty), .in_rd(ififo_rd),
    .of_din(ofifo_din), .of_wr(ofifo_wr), .of_full(ofifo_full),
    .buf_valid, .buf_len, .rd_addr(buf_addr), .rd_data(buf_data),
    .buf_release, .stall(pb_stall));

  pkt_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(ofifo_wr), .din(ofifo_din), .full(ofifo_full),
    .rd_en(ofifo_rd), .dout(ofifo_dout), .empty(ofifo_empty),
    .count(ofifo_count));

  // Bloom filter with its two clients
  logic              hp_req, hp_valid, hp_hit;
  logic [31:0]       hp_ip;
  logic              lp_req, lp_we, lp_ack;
  logic [AW-1:0]     lp_addr;
  logic [WORD_W-1:0] lp_wdata, lp_rdata;

  bloom_filter #(.N_BITS(N_BITS), .WORD_W(WORD_W)) u_bf (
    .clk, .rst_n, .ready(bf_ready),
    .hp_req, .hp_ip, .hp_valid, .hp_hit,
    .lp_req, .lp_we, .lp_addr, .lp_wdata, .lp_ack, .lp_rdata);

  usbi #(.N_BITS(N_BITS), .WORD_W(WORD_W)) u_usbi (
    .clk, .rst_n,
    .usr_req, .usr_op, .usr_addr, .usr_wdata, .usr_ip,
    .usr_ack, .usr_rdata, .usr_hit,
    .lp_req, .lp_we, .lp_addr, .lp_wdata, .lp_ack, .lp_rdata);

  // Inspector and output stage
  logic       dec_valid, dec_ready, dec_match;
  logic [7:0] dec_dst;
  logic       pkt_out, pkt_drop;

  inspector #(.BUF_WORDS(BUF_WORDS)) u_insp (
    .clk, .rst_n, .mode, .bf_ready,
    .buf_valid, .buf_len, .rd_addr(buf_addr), .rd_data(buf_data), .buf_release,
    .hp_req, .hp_ip, .hp_valid, .hp_hit,
    .dec_valid, .dec_dst, .dec_match, .dec_ready);

  out_gate u_out (
    .clk, .rst_n,
    .of_dout(ofifo_dout), .of_empty(ofifo_empty), .of_rd(ofifo_rd),
    .dec_valid, .dec_dst, .dec_ready,
    .out_data, .out_ctrl, .out_wr, .out_rdy,
    .pkt_out, .pkt_drop);

  a_in_wr_rdy: assert property (@(posedge clk) disable iff (!rst_n) in_wr |-> in_rdy);
endmodule
