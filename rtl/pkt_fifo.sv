// pkt_fifo: synchronous first-word-fall-through FIFO used as the Input FIFO
// and the Output FIFO of the traffic inspector.
//
// The inspector regulates the words entering and leaving it through two
// FIFO queues; their depth and width are not fixed by the design, so this
// one is a plain circular buffer with a parameterised width and a
// power-of-two depth. The word at the head is always visible on `dout`
// while `empty` is low; asserting `rd_en` pops it at the next clock edge.
// `wr_en` pushes `din` at the clock edge and must only be asserted while
// `full` is low (likewise `rd_en` while `empty` is low); a push and a pop may
// happen in the same cycle. `count` gives the fill level. Reset (active-low,
// synchronous) empties the queue; the storage itself is not reset.
module pkt_fifo #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;

  assign count = wr_ptr - rd_ptr;
  assign empty = (wr_ptr == rd_ptr);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (rd_en) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Handshake rules: never push into a full queue nor pop an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("DEPTH must be a power of two");
  end
endmodule
