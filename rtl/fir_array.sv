// fir_array: the simple FIR filter mapping, one tap per cell.
// NUM_TAPS fir_cells are chained: the X bus (weights during initialisation,
// then the input samples) enters the first cell, partial sums start at zero in
// the first cell and leave the last cell through an output register, giving
//   Y[i] = sum_{j=0}^{NUM_TAPS-1} X[i-j] * W[j]   (16-bit wrap-around).
// Operation has two phases. Load: the weights go down the X bus in the order
// W[NUM_TAPS-1] ... W[0], one per cycle, with ld high; ld goes low after W[0]
// and each cell is left holding its own weight (cell j holds W[j]). Compute:
// the samples X[0], X[1], ... follow with xv high; no other signal is needed.
// Timing: one sample per cycle; Y[i] appears on y_out, with yv high, NUM_TAPS+1
// cycles after X[i] was presented (counting only cycles with en high).
// Outputs are flagged valid only once NUM_TAPS samples have entered, so the
// first valid output is Y[NUM_TAPS-1]. en low stalls the whole pipeline.
// NUM_TAPS = 16 fills the 16 multipliers of a RaPiD-1 array.
module fir_array
  import rapid_pkg::*;
#(
  parameter int unsigned NUM_TAPS = NUM_CELLS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  x_in,
  input  logic               xv_in,
  input  logic               ld_in,
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out
);
  logic [WORD_W-1:0] x [NUM_TAPS+1];
  logic [WORD_W-1:0] y [NUM_TAPS+1];
  logic              xv[NUM_TAPS+1], yv[NUM_TAPS+1], ld[NUM_TAPS+1];
  logic [WORD_W-1:0] w [NUM_TAPS];

  assign x[0]  = x_in;
  assign xv[0] = xv_in;
  assign ld[0] = ld_in;
  assign y[0]  = '0;     // the zero line feeds the first adder
  assign yv[0] = 1'b1;

  for (genvar k = 0; k < NUM_TAPS; k++) begin : g_tap
    fir_cell u_cell (
      .clk, .rst_n, .en,
      .x_in(x[k]), .xv_in(xv[k]), .ld_in(ld[k]), .y_in(y[k]), .yv_in(yv[k]),
      .x_out(x[k+1]), .xv_out(xv[k+1]), .ld_out(ld[k+1]),
      .y_out(y[k+1]), .yv_out(yv[k+1]), .weight(w[k]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y_out  <= '0;
      yv_out <= 1'b0;
    end else if (en) begin
      y_out  <= y[NUM_TAPS];
      yv_out <= yv[NUM_TAPS];
    end
endmodule
