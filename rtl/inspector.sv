// inspector: classifies each packet by its source and destination IPv4
// addresses and decides where the packet goes.
//
// When the Packet Buffer holds the first words of a packet, the Inspector
// reads its module header (for the source port), the EtherType and the two
// IPv4 addresses out of the buffer, one word per cycle, and queries the
// Bloom filter twice: first with the source address, then with the
// destination address, in consecutive cycles. A packet matches when either
// address hits. Non-IPv4 packets, or packets too short to hold both
// addresses, never match. The decision is the one-hot destination-port field
// for the packet's module header:
//   Tap and Drop   match: the CPU port paired with the source port; else none
//   Forward and Tap  the MAC port paired with the source (i <-> i^1, a wire
//                  through the station), plus that CPU port on a match
// `dec_valid` is held with `dec_dst`/`dec_match` until the output stage takes
// the packet's first word (`dec_ready`); the Inspector then releases the
// buffer and moves on to the next packet. From `buf_valid` to `dec_valid`
// takes 7 cycles for an IPv4 packet; the Inspector does not start while the
// Bloom filter is still clearing (`bf_ready` low).
// Two queries per packet, either-address matching, and the two modes follow
// the design; the port pairing and the read order are this design's choice.
module inspector #(
  parameter int unsigned BUF_WORDS = 6,
  localparam int unsigned BAW = $clog2(BUF_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bi_pkg::li_mode_e   mode,
  input  logic               bf_ready,
  // Packet Buffer
  input  logic               buf_valid,
  input  logic [BAW:0]       buf_len,
  output logic [BAW-1:0]     rd_addr,
  input  bi_pkg::bus_word_t  rd_data,
  output logic               buf_release,
  // Bloom filter (high-priority port)
  output logic               hp_req,
  output logic [31:0]        hp_ip,
  input  logic               hp_valid,
  input  logic               hp_hit,
  // decision to the output stage
  output logic               dec_valid,
  output logic [7:0]         dec_dst,
  output logic               dec_match,
  input  logic               dec_ready
);
  import bi_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_ETH, S_SRC, S_DST, S_Q1, S_Q2, S_Q3, S_DEC} state_e;
  state_e state;

  li_mode_e    mode_q;
  logic [1:0]  port_idx;
  logic        is_ip;
  logic [31:0] src_ip, dst_ip;
  logic        hit_src;

  // Buffer word indices (word 0 is the module header).
  localparam int unsigned A_HDR = 0;
  localparam int unsigned A_ETH = 1 + ETYPE_WORD;
  localparam int unsigned A_SRC = 1 + SRCIP_WORD;
  localparam int unsigned A_DST = 1 + DSTIP_WORD1;

  always_comb begin
    unique case (state)
      S_ETH:   rd_addr = BAW'(A_ETH);
      S_SRC:   rd_addr = BAW'(A_SRC);
      S_DST:   rd_addr = BAW'(A_DST);
      default: rd_addr = BAW'(A_HDR);
    endcase
    hp_req = (state == S_Q1 && is_ip) || state == S_Q2;
    hp_ip  = (state == S_Q2) ? dst_ip : src_ip;
  end

  // Destination ports for a finished classification.
  function automatic logic [7:0] ports(li_mode_e m, logic [1:0] idx, logic hit);
    logic [7:0] cpu, mac;
    cpu = 8'b1 << {idx, 1'b1};
    mac = 8'b1 << {idx ^ 2'b01, 1'b0};
    if (m == MODE_TAP_DROP) return hit ? cpu : 8'h00;
    else                    return mac | (hit ? cpu : 8'h00);
  endfunction

  assign buf_release = (state == S_DEC) && dec_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_q    <= MODE_FWD_TAP;
      port_idx  <= '0;
      is_ip     <= 1'b0;
      src_ip    <= '0;
      dst_ip    <= '0;
      hit_src   <= 1'b0;
      dec_valid <= 1'b0;
      dec_dst   <= '0;
      dec_match <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (buf_valid && bf_ready) begin
          mode_q   <= mode;
          port_idx <= rd_data.data[HDR_SRC_LSB+1 +: 2];
          // the addresses end in buffer word A_DST
          is_ip    <= (buf_len > (BAW+1)'(A_DST));
          state    <= S_ETH;
        end
        S_ETH: begin
          if (rd_data.data[31:16] != ETHERTYPE_IPV4) is_ip <= 1'b0;
          state <= S_SRC;
        end
        S_SRC: begin
          src_ip       <= rd_data.data[47:16];
          dst_ip[31:16] <= rd_data.data[15:0];
          state        <= S_DST;
        end
        S_DST: begin
          dst_ip[15:0] <= rd_data.data[63:48];
          state        <= S_Q1;
        end
        S_Q1: state <= is_ip ? S_Q2 : S_DEC;
        S_Q2: begin
          hit_src <= hp_valid && hp_hit;
          state   <= S_Q3;
        end
        S_Q3: state <= S_DEC;
        default: ;  // S_DEC handled below
      endcase
      if (state == S_Q1 && !is_ip) begin
        dec_valid <= 1'b1;
        dec_match <= 1'b0;
        dec_dst   <= ports(mode_q, port_idx, 1'b0);
      end
      if (state == S_Q3) begin
        dec_valid <= 1'b1;
        dec_match <= hit_src || (hp_valid && hp_hit);
        dec_dst   <= ports(mode_q, port_idx, hit_src || (hp_valid && hp_hit));
      end
      if (state == S_DEC && dec_ready) begin
        dec_valid <= 1'b0;
        state     <= S_IDLE;
      end
    end
  end
endmodule
