// dct2d_array: N x N 2-D DCT on 2N cells as Y = ((A x W)^T x W)^T.
// The first N cells multiply each N x N block A (streamed in row-major
// order) by W and emit the product transposed, column by column; that stream
// is the row-major input of the second N cells, which multiply by W again and
// transpose once more. The output block therefore equals W^T A W in row-major
// order, whose element [i][j] is the unscaled 2-D DCT coefficient y_ji.
// W is loaded once into both groups: cell k holds column (k mod N).
// Control buses (one bit each, inserted with every stream word):
//   av, rend0      valid element / last element of a row for the first group
//   we             weight write enable, half-speed bus through all cells
//   s0, p0         transpose start/stop and token for the first group
//   rend1, s1, p1  the same for the second group; they travel through the
//                  first group on plain one-register-per-cell control buses
//   ld             loading phase: the top bus crosses into the second group;
//                  otherwise the second group reads the first group's output
// Schedule (word index e, counting only cycles with en high; blocks b >= 0 of
// A start at word E0 + N*N*b):
//   load:   e = 2N*n + k holds W[n][k mod N] for n,k < N (rows sent twice),
//           we on e = 2N*n, ld on all load words; then one word with rend0 and
//           rend1 high and av low clears the address registers.
//   group 0: s0 on every word E0 + N*m (m >= N), p0 on E0 + N*N*(b+1).
//   group 1: element q of block b's transposed stream is aligned with word
//           E0 + N*N*(b+1) + 2 + q: rend1 there when q mod N = N-1; s1 on
//           E0 + N*N*(b+1) + 2 + N*m' for m' >= N, p1 on E0+N*N*(b+2)+2.
//   After the last block, three blocks of words with av low (the s/p
//   schedule continuing) flush it out: each block leaves two blocks later.
// N = 8 (an 8 x 8 DCT on a 16-cell array) is the document's configuration.
module dct2d_array
  import rapid_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  a_in,
  input  logic               av_in,
  input  logic               rend0_in,
  input  logic               we_in,
  input  logic               s0_in,
  input  logic               p0_in,
  input  logic               rend1_in,
  input  logic               s1_in,
  input  logic               p1_in,
  input  logic               ld_in,
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out
);
  localparam int unsigned C = 2 * N;

  logic [WORD_W-1:0] a [C+1];
  logic [WORD_W-1:0] o [C+1];
  logic [WORD_W-1:0] a_cell [C];
  logic              av[C+1], rend[C+1], we[C+1], s[C+1], t[C+1], ov[C+1];
  logic              av_cell[C], rend_cell[C], s_cell[C], p_cell[C];
  // group-1 control buses pipelined through the first group
  logic [N-1:0]      rend1_d, s1_d, p1_d, ld_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rend1_d <= '0; s1_d <= '0; p1_d <= '0; ld_d <= '0;
    end else if (en) begin
      rend1_d <= {rend1_d[N-2:0], rend1_in};
      s1_d    <= {s1_d[N-2:0],    s1_in};
      p1_d    <= {p1_d[N-2:0],    p1_in};
      ld_d    <= {ld_d[N-2:0],    ld_in};
    end

  assign we[0] = we_in;
  assign o[0]  = '0;
  assign ov[0] = 1'b0;

  for (genvar k = 0; k < C; k++) begin : g_cell
    if (k == 0) begin : g_first
      assign a_cell[k] = a_in;   assign av_cell[k] = av_in;
      assign rend_cell[k] = rend0_in;
      assign s_cell[k] = s0_in;  assign p_cell[k] = p0_in;
    end else if (k == N) begin : g_boundary
      assign a_cell[k]    = ld_d[N-1] ? a[k]  : o[k];
      assign av_cell[k]   = ld_d[N-1] ? av[k] : ov[k];
      assign rend_cell[k] = rend1_d[N-1];
      assign s_cell[k]    = s1_d[N-1];
      assign p_cell[k]    = p1_d[N-1];
    end else begin : g_chain
      assign a_cell[k] = a[k];   assign av_cell[k] = av[k];
      assign rend_cell[k] = rend[k];
      assign s_cell[k] = s[k];   assign p_cell[k] = t[k];
    end

    dct2d_cell #(.N(N)) u_cell (
      .clk, .rst_n, .en,
      .a_in(a_cell[k]), .av_in(av_cell[k]), .rend_in(rend_cell[k]), .we_in(we[k]),
      .s_in(s_cell[k]), .p_in(p_cell[k]),
      .o_in((k == N) ? '0 : o[k]), .ov_in((k == N) ? 1'b0 : ov[k]),
      .a_out(a[k+1]), .av_out(av[k+1]), .rend_out(rend[k+1]), .we_out(we[k+1]),
      .s_out(s[k+1]), .t_out(t[k+1]), .o_out(o[k+1]), .ov_out(ov[k+1]));
  end

  assign y_out  = o[C];
  assign yv_out = ov[C];
endmodule
