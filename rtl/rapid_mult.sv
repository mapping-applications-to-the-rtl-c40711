// rapid_mult: the RaPiD multiplier.
// Multiplies two signed 16-bit words into a 32-bit product, shifts it right
// arithmetically by a statically programmed amount (SHIFT) to keep a chosen
// fixed-point format, and offers both words of the shifted result as separate
// outputs (hi, lo). With PIPE=1 the product passes through the multiplier's
// internal pipeline register (one cycle latency, held while en is low);
// with PIPE=0 it is combinational.
// Signed operands and an arithmetic shift are this design's choice; the
// document gives the double-word result, the static shift and the two outputs.
module rapid_mult
  import rapid_pkg::*;
#(
  parameter int unsigned SHIFT = 0,
  parameter bit          PIPE  = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  a,
  input  logic [WORD_W-1:0]  b,
  output logic [WORD_W-1:0]  hi,
  output logic [WORD_W-1:0]  lo
);
  logic signed [2*WORD_W-1:0] prod, shifted, q;

  always_comb begin
    prod    = signed'(a) * signed'(b);
    shifted = prod >>> SHIFT;
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  q <= '0;
      else if (en) q <= shifted;
  end else begin : g_comb
    assign q = shifted;
  end

  assign hi = q[2*WORD_W-1:WORD_W];
  assign lo = q[WORD_W-1:0];
endmodule
