// me_array: motion estimation by full search, C compute stages plus a final
// totaling stage.
// A super reference block (R rows x C columns, four R/2 x C/2 reference
// blocks) is compared with every position inside a super query window of QR
// rows and 2C columns. Stage c holds column c of the super RB and one column
// of the window; rows are processed one per cycle and the per-row absolute
// differences are summed across the stages (me_cell). Block differences are
// done in column-major order: for one column position the RB slides down the
// window one row per block difference (QR-R+1 positions, R cycles each);
// then the window shifts one stage to the right, i.e. the RB moves one column
// left.
// The final stage adds up the row sums of each block difference separately
// for the four reference blocks (upper/lower rows x left/right bus), keeps
// the smallest block difference of each and the position index at which it
// occurred (index = number of block differences since the last report, so
// index = h*(QR-R+1) + s for column position h and start row s; ties keep the
// first). Four words with emit set report the four blocks in the order
// upper-left, upper-right, lower-left, lower-right (sad, pos with res_v) and
// reset the minima.
// Context bits (me_ctl_t) travel with every word; the word schedule for one
// super RB is: C column shifts to preload the window (rightmost column
// first), then for each of the C+1 column positions one column shift (except
// the first position), one hsh word and (QR-R+1)*R act words with bdend on
// every R-th. A column shift is one hsh word and QR qsh words carrying the
// new column, top row first, on qw_in; RB preload words (rbv, rbwe on the first of each RB row)
// may overlap any of these; par selects the RB buffer and is toggled between
// super RBs; finally the emit words. Results appear C+1 cycles after the
// emit words enter. RaPiD-1 sizes: C = R = 16 stages/rows, QR = 32.
module me_array
  import rapid_pkg::*;
#(
  parameter int unsigned C  = NUM_CELLS,
  parameter int unsigned R  = NUM_CELLS,
  parameter int unsigned QR = 2 * NUM_CELLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  me_ctl_t            ctl,
  input  logic [WORD_W-1:0]  qw_in,
  input  logic [WORD_W-1:0]  rb_in,
  output logic [WORD_W-1:0]  sad,
  output logic [WORD_W-1:0]  pos,
  output logic               res_v
);
  me_ctl_t           c [C+1];
  logic [WORD_W-1:0] qw [C+1];
  logic [WORD_W-1:0] rb [C+1];
  logic [WORD_W-1:0] sl [C+1];
  logic [WORD_W-1:0] sr [C+1];

  assign c[0] = ctl;  assign qw[0] = qw_in;  assign rb[0] = rb_in;
  assign sl[0] = '0;  assign sr[0] = '0;

  for (genvar k = 0; k < C; k++) begin : g_stage
    me_cell #(.QR(QR), .HALF(k >= C / 2)) u_cell (
      .clk, .rst_n, .en,
      .ctl_in(c[k]), .qw_in(qw[k]), .rb_in(rb[k]), .suml_in(sl[k]), .sumr_in(sr[k]),
      .ctl_out(c[k+1]), .qw_out(qw[k+1]), .rb_out(rb[k+1]),
      .suml_out(sl[k+1]), .sumr_out(sr[k+1]));
  end

  // ---------------- final totaling stage ----------------
  localparam int unsigned RCW = $clog2(R) + 1;
  me_ctl_t           cf;
  logic [WORD_W-1:0] slf, srf;
  logic [RCW-1:0]    rcnt;
  logic [WORD_W-1:0] acc [4];
  logic [WORD_W-1:0] best [4];
  logic [WORD_W-1:0] best_pos [4];
  logic [WORD_W-1:0] pcount;
  logic [1:0]        ecnt;
  logic [WORD_W-1:0] nxt [4];
  logic              upper;

  assign upper = (rcnt < RCW'(R / 2));

  always_comb begin
    nxt[0] = acc[0] + (upper ? slf : '0);
    nxt[1] = acc[1] + (upper ? srf : '0);
    nxt[2] = acc[2] + (upper ? '0 : slf);
    nxt[3] = acc[3] + (upper ? '0 : srf);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cf <= '0; slf <= '0; srf <= '0; rcnt <= '0; pcount <= '0; ecnt <= '0;
      for (int q = 0; q < 4; q++) begin
        acc[q] <= '0; best[q] <= '1; best_pos[q] <= '0;
      end
    end else if (en) begin
      cf  <= c[C];
      slf <= sl[C];
      srf <= sr[C];
      if (cf.act) begin
        if (cf.bdend) begin
          rcnt   <= '0;
          pcount <= pcount + 1'b1;
          for (int q = 0; q < 4; q++) begin
            acc[q] <= '0;
            if (nxt[q] < best[q]) begin
              best[q]     <= nxt[q];
              best_pos[q] <= pcount;
            end
          end
        end else begin
          rcnt <= rcnt + 1'b1;
          for (int q = 0; q < 4; q++) acc[q] <= nxt[q];
        end
      end
      if (cf.emit) begin
        ecnt <= ecnt + 1'b1;
        if (ecnt == 2'd3) begin
          pcount <= '0;
          for (int q = 0; q < 4; q++) best[q] <= '1;
        end
      end
    end

  assign res_v = cf.emit;
  assign sad   = best[ecnt];
  assign pos   = best_pos[ecnt];
endmodule
