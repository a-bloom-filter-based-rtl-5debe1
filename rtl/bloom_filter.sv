// bloom_filter: the N-bit Bloom filter bit array and its priority-encoded
// access controller.
//
// The array (N_BITS = 65536 bits, as in the design) is held in a block RAM of
// N_BITS/WORD_W words. Port A serves either the Inspector's first hash bit or
// a low-priority word access from the USBI; port B serves the Inspector's
// second hash bit. The Inspector always wins: a USBI request is only granted
// in a cycle where the Inspector does not query. A query is answered with
// "hit" when both of its k = 2 bits are set.
//
// High-priority (Inspector) port: pulse `hp_req` with `hp_ip`; one cycle
// later `hp_valid` pulses with `hp_hit`. A query is accepted in any cycle
// once `ready` is high, so back-to-back queries are allowed.
// Low-priority (USBI) port: raise `lp_req` with `lp_we`, `lp_addr`,
// `lp_wdata` and hold them until `lp_ack` pulses; `lp_rdata` then holds the
// word as it was before any write in that access (read-first). The request
// must be dropped (or changed) in the cycle after `lp_ack`.
// After reset the controller clears the whole array, one word per cycle,
// and raises `ready` when done; until then both ports are ignored.
// The word width, the read-first behaviour and the clear-on-reset sweep are
// this design's choices; the priority rule and N follow the design.
module bloom_filter #(
  parameter int unsigned N_BITS = 65536,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned IDX_W = $clog2(N_BITS),
  localparam int unsigned DEPTH = N_BITS / WORD_W,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned BW    = $clog2(WORD_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  // Inspector (high priority)
  input  logic              hp_req,
  input  logic [31:0]       hp_ip,
  output logic              hp_valid,
  output logic              hp_hit,
  // USBI (low priority)
  input  logic              lp_req,
  input  logic              lp_we,
  input  logic [AW-1:0]     lp_addr,
  input  logic [WORD_W-1:0] lp_wdata,
  output logic              lp_ack,
  output logic [WORD_W-1:0] lp_rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  logic [IDX_W-1:0] h1, h2;
  bf_hash #(.IDX_W(IDX_W)) u_hash (.ip(hp_ip), .h1(h1), .h2(h2));

  // Clear sweep after reset.
  logic          clearing;
  logic [AW-1:0] clr_addr;

  // Priority encoding of port A.
  logic          hp_go, lp_go;
  logic [AW-1:0] addr_a, addr_b;
  logic          we_a;
  logic [WORD_W-1:0] wdata_a;

  always_comb begin
    hp_go   = ready && hp_req;
    lp_go   = ready && lp_req && !hp_req && !lp_ack;
    addr_a  = lp_addr;
    we_a    = 1'b0;
    wdata_a = lp_wdata;
    if (clearing) begin
      addr_a  = clr_addr;
      we_a    = 1'b1;
      wdata_a = '0;
    end else if (hp_go) begin
      addr_a  = h1[IDX_W-1:BW];
    end else if (lp_go) begin
      we_a    = lp_we;
    end
    addr_b = h2[IDX_W-1:BW];
  end

  // Block RAM: port A read/write (read-first), port B read.
  logic [WORD_W-1:0] q_a, q_b;
  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
  end

  logic [BW-1:0] sel_a, sel_b;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
      ready    <= 1'b0;
      hp_valid <= 1'b0;
      lp_ack   <= 1'b0;
      sel_a    <= '0;
      sel_b    <= '0;
    end else begin
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(DEPTH - 1)) begin
          clearing <= 1'b0;
          ready    <= 1'b1;
        end
      end
      hp_valid <= hp_go;
      lp_ack   <= lp_go;
      sel_a    <= h1[BW-1:0];
      sel_b    <= h2[BW-1:0];
    end
  end

  assign hp_hit   = q_a[sel_a] & q_b[sel_b];
  assign lp_rdata = q_a;

  // The USBI must hold its request until it is acknowledged.
  a_lp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (lp_req && !lp_ack && !lp_go) |=> lp_req);
  // The Inspector is never delayed.
  a_hp_first: assert property (@(posedge clk) disable iff (!rst_n)
    (ready && hp_req) |=> hp_valid);
endmodule
