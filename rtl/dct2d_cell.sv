// dct2d_cell: one cell of the 2-D DCT mapping: a matrix-multiply cell whose
// results are kept and later sent out transposed.
// Like mm_cell, the cell holds one column of W in a local memory, multiplies
// each valid element of the top bus by it, accumulates a row's dot product and
// starts afresh after the element tagged rend. Each row result is stored in
// one of two result memories (double buffering): one collects the results of
// the current block of N rows, the other holds the previous block's results.
// After N rows the roles swap (wsel toggles) and both address registers are
// cleared.
// Transpose control: three control registers and one 3-LUT per cell form a
// token-passing state machine. S (start/stop) is pipelined from cell to cell;
// P is the previous cell's token delayed one cycle; the LUT computes
// T <= S ? P : T, so the token is taken over when S pulses and held until the
// next S pulse. While T is high, the previous block's memory is read out, one
// word per cycle with an incrementing address, onto the output bus in place of
// the passing values (one register per cell). With S pulsing every N cycles
// and a single P pulse at the first cell, cell 0 empties its memory for N
// cycles, then cell 1, and so on: the block leaves column by column, i.e.
// transposed.
// Weight loading uses the same half-speed write-enable bus as mm_cell.
// The counter that swaps the buffers after N rows is this design's choice.
module dct2d_cell
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
  input  logic               s_in,     // start/stop bit from the previous cell
  input  logic               p_in,     // previous cell's token
  input  logic [WORD_W-1:0]  o_in,
  input  logic               ov_in,
  output logic [WORD_W-1:0]  a_out,
  output logic               av_out,
  output logic               rend_out,
  output logic               we_out,
  output logic               s_out,
  output logic               t_out,
  output logic [WORD_W-1:0]  o_out,
  output logic               ov_out
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [WORD_W-1:0] a_r, w_rd, prod_lo, prod_hi, acc_q, acc_d, acc_b;
  logic [WORD_W-1:0] rd0, rd1, rd_prev;
  logic              av_r, rend_r, we_r1, first_q, done_q;
  logic              s_r, p_r, t_q, t_d, wsel, swap;
  logic [CW-1:0]     wcnt;
  logic              unused_c, unused_s, unused_z;
  logic [MEM_AW-1:0] unused_a0, unused_a1, unused_a2;

  assign swap = done_q && (wcnt == CW'(N-1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_r <= '0; av_r <= 1'b0; rend_r <= 1'b0; we_r1 <= 1'b0; we_out <= 1'b0;
      acc_q <= '0; first_q <= 1'b1; done_q <= 1'b0;
      s_r <= 1'b0; p_r <= 1'b0; t_q <= 1'b0;
      wsel <= 1'b0; wcnt <= '0;
      o_out <= '0; ov_out <= 1'b0;
    end else if (en) begin
      a_r    <= a_in;
      av_r   <= av_in;
      rend_r <= rend_in;
      we_r1  <= we_in;
      we_out <= we_r1;
      if (av_r) acc_q <= acc_d;
      done_q <= av_r & rend_r;
      if (rend_r)    first_q <= 1'b1;
      else if (av_r) first_q <= 1'b0;
      // buffer swap after N stored rows
      if (done_q) begin
        wcnt <= swap ? '0 : wcnt + CW'(1);
        if (swap) wsel <= ~wsel;
      end
      // transpose token state machine
      s_r <= s_in;
      p_r <= p_in;
      t_q <= t_d;
      // output bus
      o_out  <= t_q ? rd_prev : o_in;
      ov_out <= t_q | ov_in;
    end

  assign a_out    = a_r;
  assign av_out   = av_r;
  assign rend_out = rend_r;
  assign s_out    = s_r;
  assign t_out    = t_q;

  rapid_ctrl_lut #(.TABLE(8'hCA)) u_lut (.a(t_q), .b(p_r), .c(s_r), .y(t_d));

  rapid_local_mem u_wmem (
    .clk, .rst_n, .en,
    .addr_clr(rend_r), .addr_ld(1'b0), .addr_in('0), .addr_inc(av_r | we_r1),
    .we(we_r1), .wdata(a_r), .rdata(w_rd), .addr(unused_a0));

  rapid_mult #(.SHIFT(0), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en, .a(a_r), .b(w_rd), .hi(prod_hi), .lo(prod_lo));

  assign acc_b = first_q ? '0 : acc_q;
  rapid_alu u_alu (
    .op(ALU_ADD), .a(prod_lo), .b(acc_b), .cin(1'b0),
    .y(acc_d), .cout(unused_c), .sign(unused_s), .zero(unused_z));

  // result memories: buffer wsel is written, buffer ~wsel is read out
  rapid_local_mem u_rmem0 (
    .clk, .rst_n, .en,
    .addr_clr(swap), .addr_ld(1'b0), .addr_in('0),
    .addr_inc(wsel ? t_q : done_q),
    .we(done_q && !wsel), .wdata(acc_q), .rdata(rd0), .addr(unused_a1));
  rapid_local_mem u_rmem1 (
    .clk, .rst_n, .en,
    .addr_clr(swap), .addr_ld(1'b0), .addr_in('0),
    .addr_inc(wsel ? done_q : t_q),
    .we(done_q && wsel), .wdata(acc_q), .rdata(rd1), .addr(unused_a2));

  assign rd_prev = wsel ? rd0 : rd1;
endmodule
