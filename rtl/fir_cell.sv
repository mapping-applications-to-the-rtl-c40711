// fir_cell: one tap of the simple FIR filter mapping (one RaPiD cell).
// The X bus is doubly pipelined through two register-mode bus connectors and
// the Y bus singly pipelined, so that each partial sum meets every input
// exactly once (X travels at half the speed of Y). The tap's weight sits in a
// datapath register fed from the X bus after the first pipeline register:
// while the weight-load control bit (singly pipelined, so twice as fast as
// the X values) is high the register loads, otherwise it selects its feedback
// line and holds. The multiplier (low word, no shift) multiplies the weight by
// the same X value and an ALU adds the product to the incoming partial sum.
// The Y output leaves combinationally; the next cell's input register
// pipelines it.
// Beside the figure's buses, two one-bit tags ride in the control path: xv
// marks X values that are filter input (not weights) and yv marks partial sums
// all of whose terms came from such inputs. Their use for output-stream write
// enables is this design's choice.
// en low stalls every register of the cell.
module fir_cell
  import rapid_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  x_in,    // X bus from the previous cell
  input  logic               xv_in,
  input  logic               ld_in,   // weight-load control bit
  input  logic [WORD_W-1:0]  y_in,    // partial sum from the previous cell
  input  logic               yv_in,
  output logic [WORD_W-1:0]  x_out,
  output logic               xv_out,
  output logic               ld_out,
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out,
  output logic [WORD_W-1:0]  weight   // the held weight (observation)
);
  logic [WORD_W-1:0] x_r1, y_r, prod_lo, prod_hi, unused_l, unused_l2;
  logic              xv_r1, ld_r, yv_r;
  logic              unused_d1, unused_d2, unused_d3, unused_d4, unused_c, unused_s, unused_z;

  // X bus: two register-mode bus connectors (left to right, one delay each)
  rapid_bus_connector #(.MODE(1), .DELAY(1)) u_xbc1 (
    .clk, .rst_n, .en, .l_in(x_in), .r_in('0),
    .l_out(unused_l), .r_out(x_r1), .l_drv(unused_d1), .r_drv(unused_d2));
  rapid_bus_connector #(.MODE(1), .DELAY(1)) u_xbc2 (
    .clk, .rst_n, .en, .l_in(x_r1), .r_in('0),
    .l_out(unused_l2), .r_out(x_out), .l_drv(unused_d3), .r_drv(unused_d4));

  // control path and tags
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      xv_r1 <= 1'b0; xv_out <= 1'b0; ld_r <= 1'b0;
      y_r <= '0; yv_r <= 1'b0;
    end else if (en) begin
      xv_r1  <= xv_in;
      xv_out <= xv_r1;
      ld_r   <= ld_in;
      y_r    <= y_in;
      yv_r   <= yv_in;
    end
  assign ld_out = ld_r;

  // weight register: Load from the X bus (sel 0) or Hold on feedback (sel 2)
  rapid_dpreg #(.NBUS(1)) u_w (
    .clk, .rst_n, .en, .bus(x_r1), .sel(ld_r ? 2'd0 : 2'd2), .q(weight));

  rapid_mult #(.SHIFT(0), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en, .a(weight), .b(x_r1), .hi(prod_hi), .lo(prod_lo));

  rapid_alu u_alu (
    .op(ALU_ADD), .a(prod_lo), .b(y_r), .cin(1'b0),
    .y(y_out), .cout(unused_c), .sign(unused_s), .zero(unused_z));

  assign yv_out = yv_r & xv_r1;
endmodule
