// rapid_stream_agen: address generator of one I/O stream in the memory
// controller. The memory controller runs independently of the array and
// produces a statically determined address sequence per stream. This
// generator walks a two-level loop:
//   for o in 0..outer_cnt-1: for i in 0..inner_cnt-1:
//     addr = base + o*outer_stride + i*inner_stride
// which covers linear streams and 2-D sub-blocks (e.g. 8x8 image tiles).
// start (a pulse) loads the pattern; an address is issued (valid) in every
// cycle where ready is high, until the sequence ends, then done is raised.
// The two-level pattern and the 16-bit address width are this design's
// choice; the document says only that the sequences are static.
module rapid_stream_agen #(
  parameter int unsigned AW = 16,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] inner_stride,
  input  logic [CW-1:0] inner_cnt,
  input  logic [AW-1:0] outer_stride,
  input  logic [CW-1:0] outer_cnt,
  input  logic          ready,
  output logic          valid,
  output logic [AW-1:0] addr,
  output logic          done
);
  logic [CW-1:0] i_q, o_q, icnt_q, ocnt_q;
  logic [AW-1:0] row_q, istr_q, ostr_q;
  logic          busy_q;

  assign valid = busy_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy_q <= 1'b0; done <= 1'b0;
      i_q <= '0; o_q <= '0; icnt_q <= '0; ocnt_q <= '0;
      row_q <= '0; addr <= '0; istr_q <= '0; ostr_q <= '0;
    end else if (start) begin
      busy_q <= (inner_cnt != '0) && (outer_cnt != '0);
      done   <= (inner_cnt == '0) || (outer_cnt == '0);
      i_q <= '0; o_q <= '0;
      icnt_q <= inner_cnt; ocnt_q <= outer_cnt;
      istr_q <= inner_stride; ostr_q <= outer_stride;
      row_q <= base; addr <= base;
    end else if (busy_q && ready) begin
      if (i_q + 1'b1 < icnt_q) begin
        i_q  <= i_q + 1'b1;
        addr <= addr + istr_q;
      end else if (o_q + 1'b1 < ocnt_q) begin
        i_q   <= '0;
        o_q   <= o_q + 1'b1;
        row_q <= row_q + ostr_q;
        addr  <= row_q + ostr_q;
      end else begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
endmodule
