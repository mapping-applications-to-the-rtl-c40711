// rapid_fabric: a row of NCELL programmable RaPiD cells (rapid_cell) with
// their configuration memory.
// How it works. The configuration memory holds one cell_cfg_t per cell as
// CFG_WORDS 16-bit words. It is written one word per cycle through cfg_we /
// cfg_cell / cfg_word / cfg_wdata, which stands for loading a new
// configuration. Word w of a cell holds configuration bits 16w .. 16w+15.
// The memory drives the cells' static controls directly. Cell k's right
// bus connectors and control buses feed cell k+1. The input stream enters on
// the tracks and control buses of the first cell (trk_in, cb_in), and the
// last cell's connector and control-bus outputs are trk_out and cb_out.
// Timing: a configuration word takes effect on the cycle after it is written
// and should only be written while the array is idle. Data timing follows
// from the configuration (see rapid_cell). en low stalls every cell.
// Follows the document: a linear array of identical cells, static
// configuration bits held in configuration memory, data and control
// entering at one end. Own choices: the word-wide write port, and the
// configuration memory being cleared at reset, which leaves every connector
// open and every unit idle.
module rapid_fabric
  import rapid_pkg::*;
  import rapid_fabric_pkg::*;
#(
  parameter int unsigned NCELL = NUM_CELLS,
  localparam int unsigned CAW  = (NCELL > 1) ? $clog2(NCELL) : 1,
  localparam int unsigned WAW  = $clog2(CFG_WORDS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  // configuration write port
  input  logic                         cfg_we,
  input  logic [CAW-1:0]               cfg_cell,
  input  logic [WAW-1:0]               cfg_word,
  input  logic [WORD_W-1:0]            cfg_wdata,
  // streams
  input  logic [NTRK-1:0][WORD_W-1:0]  trk_in,
  output logic [NTRK-1:0][WORD_W-1:0]  trk_out,
  input  logic [NCB-1:0]               cb_in,
  output logic [NCB-1:0]               cb_out
);
  logic [NCELL-1:0][CFG_WORDS-1:0][WORD_W-1:0] cmem;
  logic [NTRK-1:0][WORD_W-1:0]                 trk [NCELL+1];
  logic [NCB-1:0]                              cb  [NCELL+1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cmem <= '0;
    else if (cfg_we && 32'(cfg_cell) < NCELL && 32'(cfg_word) < CFG_WORDS)
      cmem[cfg_cell][cfg_word] <= cfg_wdata;

  assign trk[0] = trk_in;
  assign cb[0]  = cb_in;

  // the last word's bits above CFG_BITS are stored but not used
  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    logic [CFG_WORDS*WORD_W-1:0] flat;
    logic [CFG_WORDS*WORD_W-CFG_BITS-1:0] unused_pad;
    assign flat = cmem[k];
    assign unused_pad = flat[CFG_WORDS*WORD_W-1:CFG_BITS];
    rapid_cell u_cell (
      .clk, .rst_n, .en, .cfg(cell_cfg_t'(flat[CFG_BITS-1:0])),
      .trk_l(trk[k]), .trk_r(trk[k+1]), .cb_l(cb[k]), .cb_r(cb[k+1]));
  end

  assign trk_out = trk[NCELL];
  assign cb_out  = cb[NCELL];
endmodule
