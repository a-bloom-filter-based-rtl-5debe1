// usbi: User-Space Bloom filter Interaction module.
//
// Bridges host software and the Bloom filter so that entries can be read,
// written and added while traffic is being inspected. Both of its sides use a
// simple request/response handshake, and all of its Bloom filter accesses go
// through the filter's low-priority port, so they wait whenever the
// Inspector is querying.
//
// User side: raise `usr_req` with `usr_op`, `usr_addr`, `usr_wdata` and
// `usr_ip` and hold them until `usr_ack` pulses for one cycle; then drop
// `usr_req` before issuing the next request (the module waits for it to be
// low). Operations (bi_pkg::usr_op_e):
//   USR_READ    read word `usr_addr` of the bit array into `usr_rdata`
//   USR_WRITE   write `usr_wdata` to word `usr_addr`
//   USR_ADD_IP  set the k = 2 bits of `usr_ip` (two read-modify-writes)
//   USR_TEST_IP read the k bits of `usr_ip`; `usr_hit` = all set
// Removing or updating addresses is done by host software that recomputes
// the array and rewrites it with USR_WRITE (a Bloom filter cannot delete a
// single entry). The operation set and the handshake details are this
// design's choices; the design only fixes that a request/response protocol
// is used on both sides and that the Inspector has priority.
// Filter side: `lp_*` as described in bloom_filter.
module usbi #(
  parameter int unsigned N_BITS = 65536,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned IDX_W = $clog2(N_BITS),
  localparam int unsigned AW    = $clog2(N_BITS / WORD_W),
  localparam int unsigned BW    = $clog2(WORD_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // user-space side
  input  logic              usr_req,
  input  bi_pkg::usr_op_e   usr_op,
  input  logic [AW-1:0]     usr_addr,
  input  logic [WORD_W-1:0] usr_wdata,
  input  logic [31:0]       usr_ip,
  output logic              usr_ack,
  output logic [WORD_W-1:0] usr_rdata,
  output logic              usr_hit,
  // Bloom filter low-priority side
  output logic              lp_req,
  output logic              lp_we,
  output logic [AW-1:0]     lp_addr,
  output logic [WORD_W-1:0] lp_wdata,
  input  logic              lp_ack,
  input  logic [WORD_W-1:0] lp_rdata
);
  import bi_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WR, S_RESP, S_DONE} state_e;
  state_e state;

  usr_op_e          op;
  logic [31:0]      ip_q;
  logic [IDX_W-1:0] h1, h2;
  logic             second;  // working on the second hash bit
  logic [IDX_W-1:0] cur_idx;

  bf_hash #(.IDX_W(IDX_W)) u_hash (.ip(ip_q), .h1(h1), .h2(h2));

  assign cur_idx = second ? h2 : h1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op        <= USR_READ;
      ip_q      <= '0;
      second    <= 1'b0;
      lp_req    <= 1'b0;
      lp_we     <= 1'b0;
      lp_addr   <= '0;
      lp_wdata  <= '0;
      usr_ack   <= 1'b0;
      usr_rdata <= '0;
      usr_hit   <= 1'b0;
    end else begin
      usr_ack <= 1'b0;
      unique case (state)
        S_IDLE: if (usr_req) begin
          op     <= usr_op;
          ip_q   <= usr_ip;
          second <= 1'b0;
          if (usr_op == USR_READ || usr_op == USR_WRITE) begin
            lp_req   <= 1'b1;
            lp_we    <= (usr_op == USR_WRITE);
            lp_addr  <= usr_addr;
            lp_wdata <= usr_wdata;
            state    <= (usr_op == USR_WRITE) ? S_WR : S_RD;
          end else begin
            usr_hit <= 1'b1;
            state   <= S_RD;   // address comes from the hash, set below
          end
        end
        S_RD: begin
          if ((op == USR_ADD_IP || op == USR_TEST_IP) && !lp_req) begin
            // first cycle of a hashed access: issue the read of its word
            lp_req  <= 1'b1;
            lp_we   <= 1'b0;
            lp_addr <= cur_idx[IDX_W-1:BW];
          end else if (lp_ack) begin
            unique case (op)
              USR_READ: begin
                lp_req    <= 1'b0;
                usr_rdata <= lp_rdata;
                state     <= S_RESP;
              end
              USR_ADD_IP: begin
                lp_we    <= 1'b1;
                lp_wdata <= lp_rdata | (WORD_W'(1) << cur_idx[BW-1:0]);
                state    <= S_WR;
              end
              default: begin  // USR_TEST_IP
                usr_hit <= usr_hit & lp_rdata[cur_idx[BW-1:0]];
                lp_req  <= 1'b0;
                if (second) state <= S_RESP;
                else second <= 1'b1;
              end
            endcase
          end
        end
        S_WR: if (lp_ack) begin
          lp_req <= 1'b0;
          lp_we  <= 1'b0;
          if (op == USR_ADD_IP && !second) begin
            second <= 1'b1;
            state  <= S_RD;
          end else begin
            state <= S_RESP;
          end
        end
        S_RESP: begin
          usr_ack <= 1'b1;
          state   <= S_DONE;
        end
        S_DONE: if (!usr_req) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // User-side rule: a request is held until it is acknowledged.
  a_usr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_RD, S_WR, S_RESP}) |-> usr_req);
endmodule
