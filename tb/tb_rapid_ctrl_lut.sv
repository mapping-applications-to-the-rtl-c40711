// tb_rapid_ctrl_lut: self-checking test of rapid_ctrl_lut.
// Checks the token multiplexer table (c ? b : a) on all eight inputs and a
// random table against direct indexing.
module tb_rapid_ctrl_lut;
  int checks = 0, failures = 0;
  logic a, b, c, y_mux, y_and;
  rapid_ctrl_lut #(.TABLE(8'hCA)) u_mux (.a, .b, .c, .y(y_mux));
  rapid_ctrl_lut #(.TABLE(8'h80)) u_and (.a, .b, .c, .y(y_and));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {c, b, a} = 3'(i);
      #1;
      checks++;
      if (y_mux !== (c ? b : a)) begin failures++; $display("FAIL mux %0d", i); end
      checks++;
      if (y_and !== (a & b & c)) begin failures++; $display("FAIL and %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
