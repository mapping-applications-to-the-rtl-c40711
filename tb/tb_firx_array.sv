// tb_firx_array: self-checking test of the extended FIR filter at its default
// size (16 cells, 4 taps per cell, 64 taps). Loads random weights in groups
// with a half-speed write-enable pulse, sends an idle word, then streams random
// samples, one per handshake with the first stage (which repeats each 4
// times), with random stall cycles. Every output from
// Y[63] on (the first whose partial sums all started after the first sample)
// is compared with the direct convolution Y[i] = sum_j X[i-j]*W[j] (16-bit
// wrap-around). Also checks that Y[i] arrives N+M enabled cycles after X[i]
// was taken, that a sample is taken only every M cycles, that there is one
// output per sample, and that stalls happened.
module tb_firx_array;
  localparam int N  = 16;
  localparam int M  = 4;
  localparam int T  = N * M;
  localparam int NX = T + 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [15:0] x_in, y_out;
  logic        xv_in, ld_in, we_in, in_rdy, yv_out;
  logic [15:0] w [T];
  logic [15:0] x [NX];
  int          cyc = 0, xcyc [NX], nout = 0, stalls = 0, waits = 0;

  firx_array #(.N(N), .M(M)) u_dut (
    .clk, .rst_n, .en, .x_in, .xv_in, .ld_in, .we_in, .in_rdy, .y_out, .yv_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(int i);
    logic [15:0] s = 0;
    for (int j = 0; j < T; j++) s += x[i-j] * w[j];
    return s;
  endfunction

  // output monitor: count enabled cycles, check outputs past the warm-up
  always @(posedge clk) if (rst_n && en) begin
    cyc <= cyc + 1;
    if (yv_out) begin
      if (nout >= T - 1) begin
        checks++;
        if (y_out !== ref_y(nout)) begin
          failures++;
          $display("FAIL Y[%0d]=%h exp %h", nout, y_out, ref_y(nout));
        end
        checks++;
        if (cyc - xcyc[nout] != N + M) begin
          failures++;
          $display("FAIL latency of Y[%0d] = %0d", nout, cyc - xcyc[nout]);
        end
      end
      nout <= nout + 1;
    end
  end

  task automatic feed(input logic [15:0] d, input logic v,
                      input logic ld, input logic we, input int idx);
    @(negedge clk);
    x_in = d; xv_in = v; ld_in = ld; we_in = we;
    en = ($urandom_range(0, 4) != 0);
    while (!en || !in_rdy) begin
      if (en) waits++;
      else    stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
    end
    if (idx >= 0) xcyc[idx] = cyc;
  endtask

  initial begin
    x_in = 0; xv_in = 0; ld_in = 0; we_in = 0;
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: group g, word k -> cell k, address g, holds W[T-1-(k*M+g)]
    for (int g = 0; g < M; g++)
      for (int k = 0; k < N; k++)
        feed(w[T-1-(k*M+g)], 1'b0, 1'b1, k == 0, -1);
    // ld stays high until the last pulse has reached the last cell
    for (int k = 0; k < N; k++) feed(16'd0, 1'b0, 1'b1, 1'b0, -1);
    feed(16'd0, 1'b0, 1'b0, 1'b0, -1);   // idle word clears addresses
    for (int i = 0; i < NX; i++) feed(x[i], 1'b1, 1'b0, 1'b0, i);
    for (int i = 0; i < N + M + 4; i++) feed(16'd0, 1'b0, 1'b0, 1'b0, -1);
    @(negedge clk); en = 0;
    checks++;
    if (nout != NX) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (stalls == 0) failures++;
    checks++;   // M-1 enabled wait cycles per sample (the first stage repeats it)
    if (waits != NX * (M - 1)) begin failures++; $display("FAIL waits %0d", waits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
