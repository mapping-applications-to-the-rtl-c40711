// rapid_local_mem: one RaPiD local memory (32 words of 16 bits) with its
// address register.
// The address register is a specialised datapath register: besides loading an
// address from a bus (addr_ld) or clearing it (addr_clr), one of its inputs is
// an incrementing feedback path (addr_inc), which serves the common case of
// sequential access without any ALU. Priority: clear, load, increment, hold.
// The word at the current address is read combinationally on rdata; a write
// (we) stores wdata at the current address on the clock edge. Address and
// data operations in the same cycle use the address before the update.
// en low (array stall) freezes the address register and blocks writes.
// The 32-word size is RaPiD-1's; the read/write timing and the priority of the
// address controls are this design's choices.
module rapid_local_mem
  import rapid_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               addr_clr,
  input  logic               addr_ld,
  input  logic [AW-1:0]      addr_in,
  input  logic               addr_inc,
  input  logic               we,
  input  logic [WORD_W-1:0]  wdata,
  output logic [WORD_W-1:0]  rdata,
  output logic [AW-1:0]      addr
);
  logic [WORD_W-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             addr <= '0;
    else if (en) begin
      if (addr_clr)         addr <= '0;
      else if (addr_ld)     addr <= addr_in;
      else if (addr_inc)    addr <= addr + AW'(1);
    end

  always_ff @(posedge clk)
    if (en && we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
