// rapid_bus_connector: joins two adjacent segments of a segmented bus track.
// Statically programmed as open (no connection), as a one-way buffer from the
// left segment to the right one, or from right to left. A buffered connection
// can be pipelined with DELAY = 0..3 registers, which lets data pipelines be
// built in the bus structure itself. l_drv/r_drv tell whether the connector
// drives that side (on chip a tristate enable; here a plain flag with the
// driven value on l_out/r_out, 0 when not driven). en low stalls the
// registers. Registers reset to zero (this design's choice).
module rapid_bus_connector
  import rapid_pkg::*;
#(
  parameter int unsigned MODE  = 1,  // 0 open, 1 left-to-right, 2 right-to-left
  parameter int unsigned DELAY = 1   // 0..3 pipeline registers
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  l_in,
  input  logic [WORD_W-1:0]  r_in,
  output logic [WORD_W-1:0]  l_out,
  output logic [WORD_W-1:0]  r_out,
  output logic               l_drv,
  output logic               r_drv
);
  logic [WORD_W-1:0] src, dly;

  assign src = (MODE == 2) ? r_in : l_in;

  if (DELAY == 0) begin : g_wire
    assign dly = src;
  end else begin : g_regs
    logic [WORD_W-1:0] pipe [DELAY];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < DELAY; i++) pipe[i] <= '0;
      end else if (en) begin
        pipe[0] <= src;
        for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
      end
    assign dly = pipe[DELAY-1];
  end

  assign r_drv = (MODE == 1);
  assign l_drv = (MODE == 2);
  assign r_out = r_drv ? dly : '0;
  assign l_out = l_drv ? dly : '0;

  initial assert (MODE <= 2 && DELAY <= 3)
    else $error("rapid_bus_connector: MODE must be 0..2 and DELAY 0..3");
endmodule
