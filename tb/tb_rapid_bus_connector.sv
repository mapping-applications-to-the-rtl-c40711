// tb_rapid_bus_connector: self-checking test of rapid_bus_connector.
// Instances in every mode (open, left-to-right with 0..3 registers,
// right-to-left with 2 registers) see the same random words; each driven side
// must show the input delayed by exactly the programmed number of cycles
// (stalled cycles not counted) and undriven sides must stay idle.
module tb_rapid_bus_connector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic [15:0] l_in, r_in;
  logic [15:0] lo [6], ro [6];
  logic        ld [6], rd [6];

  rapid_bus_connector #(.MODE(0), .DELAY(0)) u_open (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[0]), .r_out(ro[0]), .l_drv(ld[0]), .r_drv(rd[0]));
  rapid_bus_connector #(.MODE(1), .DELAY(0)) u_lr0 (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[1]), .r_out(ro[1]), .l_drv(ld[1]), .r_drv(rd[1]));
  rapid_bus_connector #(.MODE(1), .DELAY(1)) u_lr1 (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[2]), .r_out(ro[2]), .l_drv(ld[2]), .r_drv(rd[2]));
  rapid_bus_connector #(.MODE(1), .DELAY(2)) u_lr2 (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[3]), .r_out(ro[3]), .l_drv(ld[3]), .r_drv(rd[3]));
  rapid_bus_connector #(.MODE(1), .DELAY(3)) u_lr3 (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[4]), .r_out(ro[4]), .l_drv(ld[4]), .r_drv(rd[4]));
  rapid_bus_connector #(.MODE(2), .DELAY(2)) u_rl2 (.clk, .rst_n, .en, .l_in, .r_in,
    .l_out(lo[5]), .r_out(ro[5]), .l_drv(ld[5]), .r_drv(rd[5]));

  logic [15:0] lhist [$], rhist [$];   // inputs of enabled cycles, newest first

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] lpast(int d);
    return (d < lhist.size()) ? lhist[d] : 16'd0;
  endfunction
  function automatic logic [15:0] rpast(int d);
    return (d < rhist.size()) ? rhist[d] : 16'd0;
  endfunction

  initial begin
    l_in = 0; r_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      l_in = 16'($urandom); r_in = 16'($urandom);
      en = ($urandom_range(0, 5) != 0);
      #1;
      // combinational checks (delay 0 and open)
      checks++;
      if (ro[1] !== l_in || !rd[1] || ld[1] || ld[0] || rd[0] || ro[0] !== 0 || lo[0] !== 0) begin
        failures++; $display("FAIL open/wire");
      end
      checks++;
      if (ro[2] !== lpast(0) || ro[3] !== lpast(1) || ro[4] !== lpast(2)) begin
        failures++; $display("FAIL l2r delays at %0d", i);
      end
      checks++;
      if (lo[5] !== rpast(1) || !ld[5] || rd[5] || ro[5] !== 0) begin
        failures++; $display("FAIL r2l");
      end
      @(posedge clk);
      if (en) begin
        lhist.push_front(l_in);
        rhist.push_front(r_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
