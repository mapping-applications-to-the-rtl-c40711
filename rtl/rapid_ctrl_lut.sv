// rapid_ctrl_lut: a 3-input lookup table embedded in the control path.
// Computes a dynamic control signal from up to three one-bit inputs: bits of
// the control buses, ALU status, or fed-back state when a few of them form a
// small finite state machine. TABLE is the static truth table; output is
// TABLE[{c, b, a}]. Combinational; the registers around it belong to the
// control path. Example: TABLE = 8'hCA gives c ? b : a, the token
// multiplexer T = S&P | !S&T of the DCT transpose controller (a=T, b=P, c=S).
module rapid_ctrl_lut #(
  parameter logic [7:0] TABLE = 8'hCA
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = TABLE[{c, b, a}];
endmodule
