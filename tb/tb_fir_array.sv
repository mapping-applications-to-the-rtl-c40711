// tb_fir_array: self-checking test of the simple FIR mapping at its default
// size (16 taps). Loads random weights, streams random samples with random
// stall cycles, and compares every valid output with the direct convolution
// Y[i] = sum_j X[i-j]*W[j] (16-bit wrap-around). Also checks that each cell
// kept its own weight, that the first valid output is Y[15], that Y[i]
// arrives NUM_TAPS+1 enabled cycles after X[i], and that one output leaves per
// enabled cycle in steady state.
module tb_fir_array;
  localparam int T = 16;
  localparam int NX = 80;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [15:0] x_in, y_out;
  logic        xv_in, ld_in, yv_out;
  logic [15:0] w [T];
  logic [15:0] x [NX];
  int          cyc = 0, xcyc [NX], nout = 0, stalls = 0;

  fir_array #(.NUM_TAPS(T)) u_dut (.clk, .rst_n, .en, .x_in, .xv_in, .ld_in, .y_out, .yv_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(int i);
    logic [15:0] s = 0;
    for (int j = 0; j < T; j++) s += x[i-j] * w[j];
    return s;
  endfunction

  // output monitor: count enabled cycles, check valid outputs
  always @(posedge clk) if (rst_n && en) begin
    cyc <= cyc + 1;
    if (yv_out) begin
      automatic int i = T - 1 + nout;
      checks++;
      if (y_out !== ref_y(i)) begin
        failures++;
        $display("FAIL Y[%0d]=%h exp %h", i, y_out, ref_y(i));
      end
      checks++;
      if (cyc - xcyc[i] != T + 1) begin
        failures++;
        $display("FAIL latency of Y[%0d] = %0d", i, cyc - xcyc[i]);
      end
      nout <= nout + 1;
    end
  end

  task automatic feed(input logic [15:0] d, input logic v, input logic l, input int idx);
    @(negedge clk);
    x_in = d; xv_in = v; ld_in = l;
    en = ($urandom_range(0, 4) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
    end
    if (idx >= 0) xcyc[idx] = cyc;
  endtask

  initial begin
    x_in = 0; xv_in = 0; ld_in = 0;
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = T - 1; j >= 0; j--) feed(w[j], 1'b0, 1'b1, -1);
    for (int i = 0; i < NX; i++) feed(x[i], 1'b1, 1'b0, i);
    for (int i = 0; i < 2 * T + 4; i++) feed(16'd0, 1'b0, 1'b0, -1);
    @(negedge clk); en = 0;
    for (int k = 0; k < T; k++) begin
      checks++;
      if (u_dut.w[k] !== w[k]) begin failures++; $display("FAIL cell %0d weight %h", k, u_dut.w[k]); end
    end
    checks++;
    if (nout != NX - T + 1) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
