// tb_rapid_mult: self-checking test of rapid_mult.
// A combinational multiplier with no shift and a pipelined one with a static
// right shift of 15 (Q1.15 fixed point) get random signed operands; both
// output words are compared with a reference, and the pipelined one is
// checked to deliver its result exactly one clock later and to hold while
// stalled.
module tb_rapid_mult;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic [15:0] a, b, hi0, lo0, hi1, lo1;
  rapid_mult #(.SHIFT(0),  .PIPE(1'b0)) u_comb (.clk, .rst_n, .en, .a, .b, .hi(hi0), .lo(lo0));
  rapid_mult #(.SHIFT(15), .PIPE(1'b1)) u_pipe (.clk, .rst_n, .en, .a, .b, .hi(hi1), .lo(lo1));

  logic signed [31:0] exp0, exp1, exp1_prev;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp1_prev = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = 16'($urandom);
      b = 16'($urandom);
      if (i % 7 == 0) a = 16'h8000;
      en = (i % 11 != 5);
      #1;
      exp0 = $signed(a) * $signed(b);
      checks++;
      if ({hi0, lo0} !== exp0) begin
        failures++;
        $display("FAIL comb %h*%h = %h%h", a, b, hi0, lo0);
      end
      @(posedge clk); #1;
      checks++;
      exp1 = exp0 >>> 15;
      if (en) begin
        if ({hi1, lo1} !== exp1) begin
          failures++;
          $display("FAIL pipe %h*%h>>>15 = %h%h exp %h", a, b, hi1, lo1, exp1);
        end
        exp1_prev = exp1;
      end else if ({hi1, lo1} !== exp1_prev) begin
        failures++;
        $display("FAIL pipe did not hold under stall");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
