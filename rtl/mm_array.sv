// mm_array: matrix multiply Y = A x W on a chain of cells, the mapping used
// for an N-point 1-D DCT (W holds the cosine weights; the scaling of the
// final DCT is left out, as in the mapping it follows).
// N cells each hold one column of W in their local memory. A streams in row
// by row on a_in; for every row the N dot products leave on y_out as N
// consecutive valid words. Because a cell's result has to overtake the results
// of the cells after it on the doubly pipelined output bus, a row leaves in
// reverse column order of the cells: cell N-1 first. Loading column N-1-k
// into cell k therefore gives row-major output.
// Load protocol (one stream word per cycle): for n = 0..N-1 send row n of W
// reversed (W[n][N-1] first) with we high on the first word of each row; then
// one word with av low and rend high to reset the address registers.
// Compute: each element with av high, rend high on the last of a row.
// Timing: the first result of a row appears N+2 cycles after the row's last
// element; rows can follow back to back, one element per cycle.
// N = 8 (8-point DCT) is the document's configuration; en stalls the array.
module mm_array
  import rapid_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  a_in,
  input  logic               av_in,
  input  logic               rend_in,
  input  logic               we_in,
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out
);
  logic [WORD_W-1:0] a [N+1];
  logic [WORD_W-1:0] o [N+1];
  logic              av[N+1], rend[N+1], we[N+1], ov[N+1];

  assign a[0] = a_in;  assign av[0] = av_in;  assign rend[0] = rend_in;
  assign we[0] = we_in; assign o[0] = '0;     assign ov[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_cell
    mm_cell u_cell (
      .clk, .rst_n, .en,
      .a_in(a[k]), .av_in(av[k]), .rend_in(rend[k]), .we_in(we[k]),
      .o_in(o[k]), .ov_in(ov[k]),
      .a_out(a[k+1]), .av_out(av[k+1]), .rend_out(rend[k+1]), .we_out(we[k+1]),
      .o_out(o[k+1]), .ov_out(ov[k+1]));
  end

  assign y_out  = o[N];
  assign yv_out = ov[N];
endmodule
