// firx_cell: one cell of the extended FIR filter, which has more taps than
// there are multipliers. Each cell time-shares its multiplier between M taps.
// How it works. A sample x stays on the X bus for M consecutive cycles, a
// "period", and the phases 0..M-1 of that period take the cell's taps in
// turn. The left local memory holds the cell's M weights, read at an address
// that counts the phases. The product (multiplier low word) is added by the
// ALU to one of two values. In phase 0 that value is the partial sum arriving
// on the Y bus from the previous cell, which starts a new output in this
// cell. In the other phases it is a partial sum the cell started in an
// earlier period, read back from the right local memory. In phase M-1 the
// finished partial sum goes through the output mux and register to the next
// cell; in the other phases it is written back to the right memory. The
// right memory is a circular delay line of M+1 words. Its address register
// increments every cycle and wraps, so a word written now is read again
// exactly M+1 cycles later. That is one phase later in the next period, so
// the value "shifts down" one slot per period until it is sent on. The
// doubly pipelined Y bus (input register plus output register) makes a
// partial sum that leaves a cell in phase M-1 arrive in phase 0 of the next
// cell's next period, because the next cell sees every sample one cycle
// later over the singly pipelined X bus.
// Weight loading: the weights come down the X bus while ld is high. The write
// enable we runs on a control bus with two registers per cell and is tapped
// after the first, so it travels at half the speed of the data. A single we
// pulse therefore writes word t0+k into cell k, and each pulse loads one word
// into every cell. The left address increments on each write and is cleared
// by an idle word (xv and ld low) and at the end of every period.
// Interface: x_in/xv_in/last_in/ld_in/we_in enter, the same leave for the next
// cell one register later (we two registers later); y_in/yv_in arrive, and
// y_out/yv_out leave registered. en low stalls every register and memory.
// Follows the document: weights in the left RAM, intermediate Y values in the
// right RAM that shift down until they are sent to the next stage, X singly
// and Y doubly pipelined, the mux in front of the ALU and the output mux. This
// design's own choices: the phase order, the circular M+1-word delay line, the
// half-speed write enable for loading (borrowed from the matrix mappings), and
// the valid tags. The right memory is not cleared, so partial sums that were
// started before the first sample are undefined (see firx_array).
module firx_cell
  import rapid_pkg::*;
#(
  parameter int unsigned M = 4   // taps per cell, 1..MEM_WORDS-1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [WORD_W-1:0]  x_in,
  input  logic               xv_in,    // word is a sample
  input  logic               last_in,  // last phase of the sample's period
  input  logic               ld_in,    // loading phase
  input  logic               we_in,    // weight write (half-speed bus)
  input  logic [WORD_W-1:0]  y_in,
  input  logic               yv_in,
  output logic [WORD_W-1:0]  x_out,
  output logic               xv_out,
  output logic               last_out,
  output logic               ld_out,
  output logic               we_out,
  output logic [WORD_W-1:0]  y_out,
  output logic               yv_out
);
  localparam int unsigned RAW = $clog2(MEM_WORDS);

  logic [WORD_W-1:0] y_r, w_rd, part_rd, acc_in, sum, prod_hi, prod_lo, y_nxt;
  logic              we_a, yv_r, first_ph;
  logic [RAW-1:0]    laddr, raddr;
  logic              unused_c, unused_s, unused_z, unused_yv;
  logic [WORD_W-1:0] unused_hi;

  // X bus and control path: one register each (we: two, tapped after the first)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      x_out <= '0; xv_out <= 1'b0; last_out <= 1'b0; ld_out <= 1'b0;
      we_a <= 1'b0; we_out <= 1'b0; y_r <= '0; yv_r <= 1'b0; first_ph <= 1'b1;
    end else if (en) begin
      x_out <= x_in; xv_out <= xv_in; last_out <= last_in; ld_out <= ld_in;
      we_a  <= we_in; we_out <= we_a;
      y_r   <= y_in; yv_r <= yv_in;
      // phase 0 is the sample word after a period end or after idle words
      if (xv_out)        first_ph <= last_out;
      else if (!ld_out)  first_ph <= 1'b1;
    end

  // left RAM: the cell's weights, address = phase during computation
  rapid_local_mem u_lram (
    .clk, .rst_n, .en,
    .addr_clr((xv_out && last_out) || (!xv_out && !ld_out && !we_a)),
    .addr_ld(1'b0), .addr_in('0),
    .addr_inc(we_a || (xv_out && !last_out)),
    .we(we_a), .wdata(x_out), .rdata(w_rd), .addr(laddr));

  // right RAM: circular delay line of M+1 partial sums
  rapid_local_mem u_rram (
    .clk, .rst_n, .en,
    .addr_clr(raddr == RAW'(M)), .addr_ld(1'b0), .addr_in('0),
    .addr_inc(1'b1),
    .we(xv_out && !last_out), .wdata(sum), .rdata(part_rd), .addr(raddr));

  rapid_mult #(.SHIFT(0), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en, .a(w_rd), .b(x_out), .hi(prod_hi), .lo(prod_lo));

  // mux in front of the ALU: Y bus in phase 0, right RAM otherwise
  assign acc_in = first_ph ? y_r : part_rd;

  rapid_alu u_alu (
    .op(ALU_ADD), .a(prod_lo), .b(acc_in), .cin(1'b0),
    .y(sum), .cout(unused_c), .sign(unused_s), .zero(unused_z));

  // output mux: the finished sum in the last phase, else the Y bus passes on
  assign y_nxt = (xv_out && last_out) ? sum : y_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y_out <= '0; yv_out <= 1'b0;
    end else if (en) begin
      y_out  <= y_nxt;
      yv_out <= xv_out && last_out;
    end

  assign unused_hi = prod_hi;
  assign unused_yv = yv_r;

  initial assert (M >= 1 && M < MEM_WORDS)
    else $error("firx_cell: M must be 1..%0d", MEM_WORDS - 1);
endmodule
