// rapid_alu: one RaPiD integer ALU.
// Performs the usual arithmetic and logical operations on one 16-bit word.
// ALUs can be chained for wide-integer arithmetic: with CHAIN=1 the carry into
// bit 0 is taken from cin (the carry out of the less significant ALU), with
// CHAIN=0 it is 0 for ADD and 1 for SUB. The function may be static or driven
// every cycle from the control path (op input). The status outputs (sign,
// zero, carry) feed the control path; motion estimation uses the sign of a
// subtract to pick the function of a second ALU.
// Purely combinational: any pipeline register sits in the surrounding cell.
// The operation set and encoding are this design's choice; the document only
// says "the usual logical and arithmetic operations".
module rapid_alu
  import rapid_pkg::*;
#(
  parameter bit CHAIN = 1'b0
) (
  input  alu_op_e            op,
  input  logic [WORD_W-1:0]  a,
  input  logic [WORD_W-1:0]  b,
  input  logic               cin,
  output logic [WORD_W-1:0]  y,
  output logic               cout,
  output logic               sign,
  output logic               zero
);
  logic [WORD_W:0] sum;
  logic            c0;

  always_comb begin
    c0  = CHAIN ? cin : (op == ALU_SUB);
    sum = '0;
    y   = '0;
    unique case (op)
      ALU_ADD:   begin sum = {1'b0, a} + {1'b0, b}  + {{WORD_W{1'b0}}, c0}; y = sum[WORD_W-1:0]; end
      ALU_SUB:   begin sum = {1'b0, a} + {1'b0, ~b} + {{WORD_W{1'b0}}, c0}; y = sum[WORD_W-1:0]; end
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOTA:  y = ~a;
      default:   y = '0;
    endcase
  end

  assign cout = sum[WORD_W];
  assign sign = y[WORD_W-1];
  assign zero = (y == '0);
endmodule
