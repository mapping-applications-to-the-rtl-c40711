// mm_cell: one cell of the matrix-multiply mapping used for the 1-D DCT.
// The cell's local memory holds one column of the weight matrix W. Rows of the
// A matrix stream in on the top bus (one register per cell); every valid
// element is multiplied by the memory word at the current address, the address
// register increments, and an ALU accumulates the dot product in a register.
// The ALU's second input selects the zero line on the first element of a row,
// so no separate clear cycle is needed. When the element tagged rend (last of
// its row) has been accumulated, the result is multiplexed onto the bottom
// (output) bus, which has two registers per cell, and the address register is
// cleared for the next row.
// Loading: the W words travel on the top bus; the write-enable control bit
// travels on a control bus with two registers per cell (half the speed of the
// data), tapped after the first of them, so one pulse writes a different word
// into each cell. Each write increments the address. A rend tag with av low
// clears the address after loading without producing a result.
// Control tags av (valid A element), rend and we ride beside the top bus; the
// output bus carries a valid tag ov. en low stalls the cell.
module mm_cell
  import rapid_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  a_in,
  input  logic               av_in,
  input  logic               rend_in,
  input  logic               we_in,
  input  logic [WORD_W-1:0]  o_in,
  input  logic               ov_in,
  output logic [WORD_W-1:0]  a_out,
  output logic               av_out,
  output logic               rend_out,
  output logic               we_out,
  output logic [WORD_W-1:0]  o_out,
  output logic               ov_out
);
  logic [WORD_W-1:0] a_r, o_r, w_rd, prod_lo, prod_hi, acc_q, acc_d, acc_b;
  logic              av_r, rend_r, we_r1, ov_r, first_q, done_q;
  logic              unused_c, unused_s, unused_z;
  logic [MEM_AW-1:0] unused_addr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_r <= '0; av_r <= 1'b0; rend_r <= 1'b0; we_r1 <= 1'b0; we_out <= 1'b0;
      o_r <= '0; ov_r <= 1'b0; o_out <= '0; ov_out <= 1'b0;
      acc_q <= '0; first_q <= 1'b1; done_q <= 1'b0;
    end else if (en) begin
      a_r    <= a_in;
      av_r   <= av_in;
      rend_r <= rend_in;
      we_r1  <= we_in;
      we_out <= we_r1;
      o_r    <= o_in;
      ov_r   <= ov_in;
      // output bus: own result replaces the passing value in its slot
      o_out  <= done_q ? acc_q : o_r;
      ov_out <= done_q | ov_r;
      if (av_r) acc_q <= acc_d;
      done_q <= av_r & rend_r;
      if (rend_r)    first_q <= 1'b1;
      else if (av_r) first_q <= 1'b0;
    end

  assign a_out    = a_r;
  assign av_out   = av_r;
  assign rend_out = rend_r;

  rapid_local_mem u_wmem (
    .clk, .rst_n, .en,
    .addr_clr(rend_r), .addr_ld(1'b0), .addr_in('0), .addr_inc(av_r | we_r1),
    .we(we_r1), .wdata(a_r), .rdata(w_rd), .addr(unused_addr));

  rapid_mult #(.SHIFT(0), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en, .a(a_r), .b(w_rd), .hi(prod_hi), .lo(prod_lo));

  assign acc_b = first_q ? '0 : acc_q;
  rapid_alu u_alu (
    .op(ALU_ADD), .a(prod_lo), .b(acc_b), .cin(1'b0),
    .y(acc_d), .cout(unused_c), .sign(unused_s), .zero(unused_z));
endmodule
