// firx_array: the extended FIR filter, NUM_TAPS = N*M taps on N cells with
// M taps each (see firx_cell for the cell). It computes
//   Y[i] = sum_{j=0}^{N*M-1} X[i-j] * W[j]   (16-bit wrap-around).
// Cell k serves taps (N-1-k)*M .. (N-1-k)*M+M-1, so partial sums pick up
// the highest taps first and finish in the last cell, which serves taps
// 0..M-1.
// Load phase (ld high on every word). The weights go in as M groups of N
// words. Word k of group g goes to cell k, at left-memory address g, and
// must be W[N*M-1-(k*M+g)]. The first word of each group carries we high,
// and groups follow each other directly. Then at least one idle word
// (xv, ld, we low) clears the address registers.
// Compute phase. Each sample X[n] is sent once with xv high. The first stage
// takes it only while in_rdy is high, then repeats it on the X bus for M
// cycles (in_rdy low for the M-1 cycles after the take) and marks the M-th
// copy as the last of the period. Samples must follow each other without
// gaps while in_rdy is high, except stall cycles (en low), because the
// partial sums are timed by the clock.
// Timing: one sample taken and one output produced per M cycles. Y[n] leaves
// on y_out with yv high N+M enabled cycles after X[n] was taken. Outputs Y[0] .. Y[N*M-2] use
// partial sums started before the first sample; the right memories are not
// cleared, so those outputs are undefined and should be discarded (or N*M-1
// zero samples sent first).
// Follows the document: the time-shared cell with weight and intermediate-Y
// memories, and the direction of the buses. Own choices: the tap-to-cell
// order, the loading protocol, the in_rdy handshake of the first stage, and
// the default of 4 taps per cell (64 taps), the number in the document's
// worked example.
module firx_array
  import rapid_pkg::*;
#(
  parameter int unsigned N = NUM_CELLS,
  parameter int unsigned M = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  x_in,
  input  logic               xv_in,
  input  logic               ld_in,
  input  logic               we_in,
  output logic               in_rdy,   // x_in is taken this cycle (when en is high)
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out
);
  logic [WORD_W-1:0] x [N+1];
  logic [WORD_W-1:0] y [N+1];
  logic              xv[N+1], last[N+1], ld[N+1], we[N+1], yv[N+1];
  logic              unused_tail;
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  logic [CW-1:0]     rep;     // copy of the held sample on the bus; 0: take a new word
  logic [WORD_W-1:0] x_h;

  // first stage: replicate each sample M times on the X bus
  assign in_rdy = (rep == '0);
  always_comb begin
    if (in_rdy) begin
      x[0] = x_in;  xv[0] = xv_in;  last[0] = xv_in && (M == 1);
      ld[0] = ld_in; we[0] = we_in;
    end else begin
      x[0] = x_h;   xv[0] = 1'b1;   last[0] = (rep == CW'(M - 1));
      ld[0] = 1'b0; we[0] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rep <= '0; x_h <= '0;
    end else if (en) begin
      if (in_rdy) begin
        if (xv_in && M > 1) begin
          rep <= CW'(1);
          x_h <= x_in;
        end
      end else begin
        rep <= (rep == CW'(M - 1)) ? '0 : rep + CW'(1);
      end
    end

  assign y[0] = '0;     // zero line: new partial sums start from zero
  assign yv[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_cell
    firx_cell #(.M(M)) u_cell (
      .clk, .rst_n, .en,
      .x_in(x[k]), .xv_in(xv[k]), .last_in(last[k]), .ld_in(ld[k]), .we_in(we[k]),
      .y_in(y[k]), .yv_in(yv[k]),
      .x_out(x[k+1]), .xv_out(xv[k+1]), .last_out(last[k+1]), .ld_out(ld[k+1]),
      .we_out(we[k+1]), .y_out(y[k+1]), .yv_out(yv[k+1]));
  end

  assign y_out  = y[N];
  assign yv_out = yv[N];
  assign unused_tail = ^x[N] ^ xv[N] ^ last[N] ^ ld[N] ^ we[N];
endmodule
