// tb_rapid_alu: self-checking test of rapid_alu.
// Random operands for every function of a single ALU, compared with a
// reference computed here, plus two ALUs chained through the carry to add and
// subtract 32-bit numbers (the wide-integer use of chaining).
module tb_rapid_alu;
  import rapid_pkg::*;
  int checks = 0, failures = 0;

  alu_op_e          op;
  logic [15:0]      a, b, y;
  logic             cout, sign, zero;
  rapid_alu u_dut (.op, .a, .b, .cin(1'b0), .y, .cout, .sign, .zero);

  // chained pair: low ALU unchained, high ALU takes the low carry
  alu_op_e          wop;
  logic [31:0]      wa, wb;
  logic [15:0]      ylo, yhi;
  logic             clo, chi, s0, s1, z0, z1;
  rapid_alu #(.CHAIN(1'b0)) u_lo (.op(wop), .a(wa[15:0]),  .b(wb[15:0]),  .cin(1'b0),
                                  .y(ylo), .cout(clo), .sign(s0), .zero(z0));
  rapid_alu #(.CHAIN(1'b1)) u_hi (.op(wop), .a(wa[31:16]), .b(wb[31:16]), .cin(clo),
                                  .y(yhi), .cout(chi), .sign(s1), .zero(z1));

  function automatic logic [15:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_PASSA: return x;
      ALU_PASSB: return z;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      default:   return ~x;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      op = alu_op_e'(i % 8);
      a  = 16'($urandom);
      b  = (i % 16 == 3) ? a : 16'($urandom);
      #1;
      checks++;
      if (y !== ref_alu(op, a, b) || sign !== y[15] || zero !== (y == 0)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y);
      end
      if (op == ALU_ADD) begin
        checks++;
        if (cout !== (({1'b0, a} + {1'b0, b}) > 17'hFFFF)) failures++;
      end
    end
    for (int i = 0; i < 200; i++) begin
      wop = (i % 2) ? ALU_SUB : ALU_ADD;
      wa  = $urandom;
      wb  = $urandom;
      #1;
      checks++;
      if ({yhi, ylo} !== ((wop == ALU_ADD) ? wa + wb : wa - wb)) begin
        failures++;
        $display("FAIL chained %s %h %h -> %h", wop.name(), wa, wb, {yhi, ylo});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
