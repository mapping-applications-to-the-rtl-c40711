// rapid_stream_fifo: the FIFO of one RaPiD I/O stream.
// Sits between the array and the memory controller. The datapath pops from an
// input stream to get its next value and pushes results into an output
// stream; the array is stalled while it would read an empty FIFO or write a
// full one (the stall logic is in the array's wrapper, fed by empty/full).
// First-word-fall-through: dout shows the oldest word while empty is low.
// Push and pop may happen in the same cycle. DEPTH is this design's choice
// (the document gives no FIFO size); it must be a power of two.
module rapid_stream_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [AW:0]      wp, rp;
  logic             do_push, do_pop;

  assign count   = wp - rp;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = buf_q[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end

  always_ff @(posedge clk)
    if (do_push) buf_q[wp[AW-1:0]] <= din;

  // Stream protocol: the producer never pushes into a full FIFO and the
  // consumer never pops an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);
endmodule
