// rapid_dpreg: a RaPiD datapath register with its input multiplexer.
// Like every functional unit it selects its input with an n:1 multiplexer:
// NBUS bus-segment inputs plus a fixed zero line and its own feedback line.
// Selecting feedback holds the value, selecting zero clears it. The select may
// be static or come from the control path each cycle. en low freezes the
// register (array-wide stall or a disabled unit).
// Select codes: 0..NBUS-1 pick a bus, NBUS picks zero, NBUS+1 picks feedback.
// The register is reset to zero (reset value is this design's choice).
module rapid_dpreg
  import rapid_pkg::*;
#(
  parameter int unsigned NBUS = 2,
  localparam int unsigned SW  = $clog2(NBUS + 2)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [NBUS-1:0][WORD_W-1:0]   bus,
  input  logic [SW-1:0]                 sel,
  output logic [WORD_W-1:0]             q
);
  logic [WORD_W-1:0] d;

  always_comb begin
    if (sel < SW'(NBUS))        d = bus[sel];
    else if (sel == SW'(NBUS))  d = '0;
    else                        d = q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
endmodule
