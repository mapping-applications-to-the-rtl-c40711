// me_cell: one compute stage of the motion-estimation mapping.
// The stage holds one column of the super reference block (super RB) and one
// column of the super query window (super QW) in local memories. Every active
// cycle it reads row r of its RB column and row StartRow+r of its QW column,
// a subtract ALU forms rb - qw, and the sign of that difference selects the
// function of a second ALU (subtract when negative, add otherwise), which
// therefore adds |rb - qw| to the row-sum partial result arriving from the
// previous stage. Row sums travel like the partial sums of the FIR filter:
// one register per stage, one stage per cycle.
// QW addressing: the QW memory's address register counts up each active
// cycle; when a block difference ends (bdend) it is loaded from StartRow+1
// and StartRow is incremented, so the next block difference starts one row
// lower. hsh resets StartRow and the address for a new column position.
// QW shift (qsh): for each row address in turn the stage passes its stored
// value to the next stage on the QW pipe and stores the value arriving from
// the previous stage, so the whole window moves one stage to the right (the
// RB moves one column left relative to it). The same mechanism preloads the
// window.
// Double buffering: two RB memories; par selects the one used for computing,
// the other is preloaded from the RB pipe. The preload write enable travels
// at half speed (two registers per stage, tapped after the first), so one
// pulse per RB row writes a different word of the row-major RB stream into
// each stage. A change of par clears both RB address registers.
// Two row-sum buses (left and right half of the RB, HALF selects which one
// this stage adds to; the other passes through a register) let the final stage
// separate the four 8x8 blocks of a 16x16 super RB: this second bus is this
// design's addition. The QW shift as a separate phase between column
// positions is also this design's choice.
module me_cell
  import rapid_pkg::*;
#(
  parameter int unsigned QR   = 32,  // rows of a super QW column (<= 32)
  parameter bit          HALF = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  me_ctl_t            ctl_in,
  input  logic [WORD_W-1:0]  qw_in,
  input  logic [WORD_W-1:0]  rb_in,
  input  logic [WORD_W-1:0]  suml_in,
  input  logic [WORD_W-1:0]  sumr_in,
  output me_ctl_t            ctl_out,
  output logic [WORD_W-1:0]  qw_out,
  output logic [WORD_W-1:0]  rb_out,
  output logic [WORD_W-1:0]  suml_out,
  output logic [WORD_W-1:0]  sumr_out
);
  me_ctl_t           ctl_r;
  logic              rbwe_r2, par_q;
  logic [WORD_W-1:0] qw_r, rb_r, suml_r, sumr_r;
  logic [WORD_W-1:0] rb0, rb1, rb_cur, qrd, diff, acc_in, acc_out;
  logic [MEM_AW-1:0] start_row, qaddr, unused_a0, unused_a1;
  logic              sgn, par_chg, unused_c0, unused_c1, unused_z0, unused_z1, unused_s1;
  alu_op_e           pm_op;

  assign par_chg = (ctl_r.par != par_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctl_r <= '0; rbwe_r2 <= 1'b0; par_q <= 1'b0;
      qw_r <= '0; rb_r <= '0; suml_r <= '0; sumr_r <= '0;
      start_row <= '0;
    end else if (en) begin
      ctl_r   <= ctl_in;
      rbwe_r2 <= ctl_r.rbwe;
      par_q   <= ctl_r.par;
      qw_r    <= qw_in;
      rb_r    <= rb_in;
      suml_r  <= suml_in;
      sumr_r  <= sumr_in;
      // StartRow register
      if (ctl_r.hsh)                    start_row <= '0;
      else if (ctl_r.act && ctl_r.bdend) start_row <= start_row + 1'b1;
    end

  always_comb begin
    ctl_out      = ctl_r;
    ctl_out.rbwe = rbwe_r2;
  end
  assign rb_out = rb_r;
  // QW pipe: during a shift the stored value moves on; the next stage's
  // input register is the pipeline register
  assign qw_out   = ctl_r.qsh ? qrd : qw_r;
  // row-sum buses
  assign suml_out = (!HALF && ctl_r.act) ? acc_out : suml_r;
  assign sumr_out = ( HALF && ctl_r.act) ? acc_out : sumr_r;

  // reference-block memories: par picks the computing one
  rapid_local_mem u_rb0 (
    .clk, .rst_n, .en,
    .addr_clr(par_chg || (!ctl_r.par && ctl_r.act && ctl_r.bdend)),
    .addr_ld(1'b0), .addr_in('0),
    .addr_inc(ctl_r.par ? ctl_r.rbwe : ctl_r.act),
    .we(ctl_r.par && ctl_r.rbwe), .wdata(rb_r), .rdata(rb0), .addr(unused_a0));
  rapid_local_mem u_rb1 (
    .clk, .rst_n, .en,
    .addr_clr(par_chg || (ctl_r.par && ctl_r.act && ctl_r.bdend)),
    .addr_ld(1'b0), .addr_in('0),
    .addr_inc(ctl_r.par ? ctl_r.act : ctl_r.rbwe),
    .we(!ctl_r.par && ctl_r.rbwe), .wdata(rb_r), .rdata(rb1), .addr(unused_a1));
  assign rb_cur = ctl_r.par ? rb1 : rb0;

  // query-window column memory, address from StartRow
  rapid_local_mem u_qw (
    .clk, .rst_n, .en,
    .addr_clr(ctl_r.hsh),
    .addr_ld(ctl_r.act && ctl_r.bdend), .addr_in(start_row + 1'b1),
    .addr_inc(ctl_r.act || ctl_r.qsh),
    .we(ctl_r.qsh), .wdata(qw_r), .rdata(qrd), .addr(qaddr));

  // absolute difference: the subtract ALU's sign steers the +/- ALU
  rapid_alu u_sub (
    .op(ALU_SUB), .a(rb_cur), .b(qrd), .cin(1'b0),
    .y(diff), .cout(unused_c0), .sign(sgn), .zero(unused_z0));
  assign pm_op  = sgn ? ALU_SUB : ALU_ADD;
  assign acc_in = HALF ? sumr_r : suml_r;
  rapid_alu u_pm (
    .op(pm_op), .a(acc_in), .b(diff), .cin(1'b0),
    .y(acc_out), .cout(unused_c1), .sign(unused_s1), .zero(unused_z1));

  // the QW column fits its local memory
  initial assert (QR <= MEM_WORDS) else $error("me_cell: QR exceeds the local memory");
  a_qaddr: assert property (@(posedge clk) disable iff (!rst_n)
                            (en && ctl_r.act) |-> ({1'b0, qaddr} < (MEM_AW+1)'(QR)));
endmodule
