// rapid_pkg: word size, local-memory geometry and the ALU function encoding
// shared by every RaPiD block. The 16-bit word, the 32-word local memory and
// the 16-cell array are the RaPiD-1 figures; the ALU opcode encoding is this
// design's own choice.
package rapid_pkg;
  localparam int unsigned WORD_W    = 16;   // RaPiD-1 data word
  localparam int unsigned MEM_WORDS = 32;   // words per local memory
  localparam int unsigned MEM_AW    = 5;    // address bits of a local memory
  localparam int unsigned NUM_CELLS = 16;   // cells in a RaPiD-1 array

  typedef logic signed [WORD_W-1:0] word_t;

  // ALU functions: the usual arithmetic and logical operations on one word.
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,  // a + b + cin
    ALU_SUB   = 3'd1,  // a - b (a + ~b + 1, or + cin when chained)
    ALU_PASSA = 3'd2,
    ALU_PASSB = 3'd3,
    ALU_AND   = 3'd4,
    ALU_OR    = 3'd5,
    ALU_XOR   = 3'd6,
    ALU_NOTA  = 3'd7
  } alu_op_e;

  // Context bits of the motion-estimation pipeline, inserted with every
  // stream word and passed from stage to stage (see me_cell / me_array).
  typedef struct packed {
    logic rsv;    // [8] unused
    logic emit;   // [7] final stage: output the best match of one block
    logic hsh;    // [6] end of a column position: StartRow and address reset
    logic qsh;    // [5] query-window shift: pass each column to the next stage
    logic bdend;  // [4] last row of a block difference
    logic act;    // [3] absolute-difference-accumulate on this word
    logic par;    // [2] parity: which reference-block memory computes
    logic rbwe;   // [1] reference-block preload write enable (half speed)
    logic rbv;    // [0] word also carries reference-block data (stream 1)
  } me_ctl_t;
endpackage
