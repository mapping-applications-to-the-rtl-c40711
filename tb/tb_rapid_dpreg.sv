// tb_rapid_dpreg: self-checking test of rapid_dpreg.
// Drives random bus values and random selects (bus, zero, feedback) with
// occasional stalls and compares the register with a reference model.
module tb_rapid_dpreg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic [2:0][15:0] bus;
  logic [2:0]       sel;
  logic [15:0]      q, model;
  rapid_dpreg #(.NBUS(3)) u_dut (.clk, .rst_n, .en, .bus, .sel, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0; sel = 3'd4; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int j = 0; j < 3; j++) bus[j] = 16'($urandom);
      sel = 3'($urandom_range(0, 4));
      en  = ($urandom_range(0, 7) != 0);
      if (en) model = (sel < 3) ? bus[sel] : (sel == 3) ? 16'd0 : model;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL sel=%0d en=%b q=%h exp=%h", sel, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
