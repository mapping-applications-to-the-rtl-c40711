// apex_cell: one node of the Apex curve-generation tree (one RaPiD cell).
// Computes the weighted average of its two inputs
//   q = left + ((right - left) * t) >> 15
// for its private parameter t, which an ALU advances by dt every cycle while
// run is high. dt sits in a datapath register loaded before computation
// (dt_ld, which also resets t to zero). A second ALU forms right-left, the
// multiplier scales it by t, and a third ALU adds left back. The left and
// right node values arrive through one input register each; the result is
// registered, so a node's output for a given t appears two cycles after the
// inputs it used, and a parent's t must lag its children's by two cycles.
// Number format (this design's choice): t and dt are Q1.15 fractions
// (0x8000 = 1.0, t kept below it), node values are 16-bit signed integers and
// the multiplier shifts its product right by 15. en low stalls the cell.
module apex_cell
  import rapid_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               dt_ld,
  input  logic [WORD_W-1:0]  dt_in,
  input  logic               run,
  input  logic [WORD_W-1:0]  l_in,
  input  logic [WORD_W-1:0]  r_in,
  output logic [WORD_W-1:0]  q_out,
  output logic [WORD_W-1:0]  t_out
);
  logic [WORD_W-1:0] dt_q, t_q, t_next, l_r, r_r, diff, prod_lo, prod_hi, sum;
  logic [3:0]        unused;

  // dt register: loads from the datapath bus or holds on feedback
  rapid_dpreg #(.NBUS(1)) u_dt (
    .clk, .rst_n, .en, .bus(dt_in), .sel(dt_ld ? 2'd0 : 2'd2), .q(dt_q));

  rapid_alu u_tinc (
    .op(ALU_ADD), .a(t_q), .b(dt_q), .cin(1'b0),
    .y(t_next), .cout(unused[0]), .sign(), .zero());
  rapid_alu u_sub (
    .op(ALU_SUB), .a(r_r), .b(l_r), .cin(1'b0),
    .y(diff), .cout(unused[1]), .sign(), .zero());
  rapid_mult #(.SHIFT(15), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en, .a(diff), .b(t_q), .hi(prod_hi), .lo(prod_lo));
  rapid_alu u_add (
    .op(ALU_ADD), .a(prod_lo), .b(l_r), .cin(1'b0),
    .y(sum), .cout(unused[2]), .sign(), .zero());
  assign unused[3] = ^prod_hi;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      t_q <= '0; l_r <= '0; r_r <= '0; q_out <= '0;
    end else if (en) begin
      if (dt_ld)    t_q <= '0;
      else if (run) t_q <= t_next;
      l_r   <= l_in;
      r_r   <= r_in;
      q_out <= sum;
    end

  assign t_out = t_q;
endmodule
