// rapid_fabric_pkg: types and sizes of the programmable RaPiD cell
// (rapid_cell) and array (rapid_fabric).
// A cell has NTRK 16-bit bus tracks and NCB 1-bit control buses. Every unit
// input has a multiplexer (insel_t) that picks one track segment, the zero
// line or the unit's own feedback line. Every track segment is either driven
// by one unit output of the cell (usel_t) or continues the segment to its
// left through a bus connector. Every dynamic control input of a unit takes
// its value from a control source (csrc_t): a constant, a control bus, the
// registered sign of an ALU, or the cell's lookup table.
// The sizes (14 tracks, up to 15 control buses, 3 ALUs, 1 multiplier, 6
// datapath registers, 3 local memories) are RaPiD-1's. The encodings and the
// field order of the configuration word are this design's own.
package rapid_fabric_pkg;
  import rapid_pkg::*;

  localparam int unsigned NTRK = 14;   // 16-bit bus tracks
  localparam int unsigned NCB  = 15;   // 1-bit control buses
  localparam int unsigned NALU = 3;
  localparam int unsigned NREG = 6;
  localparam int unsigned NMEM = 3;

  // unit input select: 0..NTRK-1 track, NTRK zero line, NTRK+1 feedback
  typedef logic [3:0] insel_t;
  localparam insel_t IN_ZERO = insel_t'(NTRK);
  localparam insel_t IN_FB   = insel_t'(NTRK + 1);

  // unit output driving a track segment: 0 none (segment continues from the
  // left connector), 1..3 ALU, 4 multiplier high word, 5 low word,
  // 6..11 datapath register, 12..14 local memory read data
  typedef logic [3:0] usel_t;
  localparam usel_t U_NONE = 4'd0;
  localparam usel_t U_ALU0 = 4'd1;
  localparam usel_t U_MHI  = 4'd4;
  localparam usel_t U_MLO  = 4'd5;
  localparam usel_t U_REG0 = 4'd6;
  localparam usel_t U_MEM0 = 4'd12;

  // control source: 0 zero, 1 one, 2..16 control bus 0..14,
  // 17..19 registered sign of ALU 0..2, 20 LUT output, 21 LUT register
  typedef logic [4:0] csrc_t;
  localparam csrc_t C_ZERO = 5'd0;
  localparam csrc_t C_ONE  = 5'd1;
  localparam csrc_t C_CB0  = 5'd2;
  localparam csrc_t C_SGN0 = 5'd17;
  localparam csrc_t C_LUT  = 5'd20;
  localparam csrc_t C_LUTQ = 5'd21;

  typedef struct packed {
    // ALUs: operands, operation, alternate operation chosen by a control
    insel_t [NALU-1:0]       alu_a;
    insel_t [NALU-1:0]       alu_b;
    logic   [NALU-1:0][2:0]  alu_op;
    logic   [NALU-1:0][2:0]  alu_op2;
    csrc_t  [NALU-1:0]       alu_opsel;
    // multiplier
    insel_t                  mul_a;
    insel_t                  mul_b;
    logic   [4:0]            mul_shift;
    // datapath registers: input and load control (otherwise hold)
    insel_t [NREG-1:0]       reg_d;
    csrc_t  [NREG-1:0]       reg_ld;
    // local memories: write data, address input and address/write controls
    insel_t [NMEM-1:0]       mem_wd;
    insel_t [NMEM-1:0]       mem_ai;
    csrc_t  [NMEM-1:0]       mem_we;
    csrc_t  [NMEM-1:0]       mem_inc;
    csrc_t  [NMEM-1:0]       mem_clr;
    csrc_t  [NMEM-1:0]       mem_ld;
    // track drivers and the bus connectors at the cell's right edge
    usel_t  [NTRK-1:0]       trk_drv;
    logic   [NTRK-1:0]       bc_on;
    logic   [NTRK-1:0][1:0]  bc_dly;
    // control path: lookup table and control-bus registers/drivers
    logic   [7:0]            lut_tab;
    csrc_t  [2:0]            lut_in;
    logic   [NCB-1:0]        cb_reg;
    csrc_t  [NCB-1:0]        cb_drv;     // 0: pass the bus on unchanged
  } cell_cfg_t;

  localparam int unsigned CFG_BITS  = $bits(cell_cfg_t);
  localparam int unsigned CFG_WORDS = (CFG_BITS + WORD_W - 1) / WORD_W;
endpackage
