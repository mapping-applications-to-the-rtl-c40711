// tb_dct2d_array: self-checking test of the 2-D DCT mapping at its default
// size (8x8 blocks, 16 cells). Acting as the stream controller, it loads an
// integer cosine weight matrix W into both groups, streams four random 8x8
// blocks A (plus three flush blocks) with random stall cycles, and inserts the
// transpose start/stop and token bits on the schedule documented in
// dct2d_array. Every output word is compared with W^T x A x W (16-bit
// wrap-around) in row-major order. Also checks that each block leaves as 64
// back-to-back words (the token hand-over leaves no gaps) and that the token
// of every cell was held for exactly N cycles at a time.
module tb_dct2d_array;
  localparam int N = 8;
  localparam int NN = N * N;
  localparam int B = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [15:0] a_in, y_out;
  logic        av_in, rend0_in, we_in, s0_in, p0_in, rend1_in, s1_in, p1_in, ld_in, yv_out;
  logic [15:0] w [N][N];
  logic [15:0] a [B][N][N];
  int          cyc = 0, nout = 0, first_out_cyc [B], stalls = 0, tok_runs = 0, tok_bad = 0;

  localparam int COS64 [8] = '{64, 63, 59, 53, 45, 36, 24, 12};
  function automatic int cosw(int n, int i);
    int k = (i * (2 * n + 1)) % 32;
    if (k < 8)       return  COS64[k];
    else if (k < 16) return (k == 8) ? 0 : -COS64[16 - k];
    else if (k < 24) return -COS64[k - 16];
    else             return (k == 24) ? 0 : COS64[32 - k];
  endfunction

  dct2d_array #(.N(N)) u_dut (.clk, .rst_n, .en, .a_in, .av_in, .rend0_in, .we_in,
    .s0_in, .p0_in, .rend1_in, .s1_in, .p1_in, .ld_in, .y_out, .yv_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: Y = W^T A W, element [i][j]
  function automatic logic [15:0] ref_y(int b, int i, int j);
    logic [15:0] s = 0;
    for (int m = 0; m < N; m++)
      for (int n = 0; n < N; n++) s += w[m][i] * a[b][m][n] * w[n][j];
    return s;
  endfunction

  // token hold length of every cell, counted in enabled cycles
  int tok_len [2*N];
  always @(posedge clk) if (rst_n && en) begin
    for (int k = 0; k < 2 * N; k++) begin
      if (u_dut.t[k+1]) tok_len[k] <= tok_len[k] + 1;
      else if (tok_len[k] != 0) begin
        tok_runs++;
        if (tok_len[k] != N) tok_bad++;
        tok_len[k] <= 0;
      end
    end
  end

  always @(posedge clk) if (rst_n && en) begin
    cyc <= cyc + 1;
    if (yv_out) begin
      automatic int b = nout / NN, i = (nout % NN) / N, j = nout % N;
      if (b < B) begin
        checks++;
        if (y_out !== ref_y(b, i, j)) begin
          failures++;
          $display("FAIL block %0d Y[%0d][%0d]=%0d exp %0d", b, i, j,
                   $signed(y_out), $signed(ref_y(b, i, j)));
        end
        if (nout % NN == 0) first_out_cyc[b] = cyc;
        else if (nout % NN == NN - 1) begin
          checks++;
          if (cyc - first_out_cyc[b] != NN - 1) begin
            failures++;
            $display("FAIL block %0d not contiguous", b);
          end
        end
      end
      nout <= nout + 1;
    end
  end

  task automatic feed(input logic [15:0] d, input logic [8:0] c);
    @(negedge clk);
    a_in = d;
    {av_in, rend0_in, we_in, s0_in, p0_in, rend1_in, s1_in, p1_in, ld_in} = c;
    en = ($urandom_range(0, 5) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
    end
  endtask

  initial begin
    int e0, rel, rel1, blk;
    logic [15:0] d;
    logic av, r0, s0, p0, r1, s1, p1;
    a_in = 0;
    {av_in, rend0_in, we_in, s0_in, p0_in, rend1_in, s1_in, p1_in, ld_in} = '0;
    for (int n = 0; n < N; n++) for (int i = 0; i < N; i++) w[n][i] = 16'(cosw(n, i));
    for (int b = 0; b < B; b++) for (int m = 0; m < N; m++) for (int n = 0; n < N; n++)
      a[b][m][n] = 16'($urandom_range(0, 63)) - 16'd32;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load W: each row twice, write-enable pulse at the start of each row
    for (int e = 0; e < 2 * NN; e++)
      feed(w[e / (2 * N)][e % N], {2'b00, (e % (2 * N)) == 0, 5'b00000, 1'b1});
    feed(16'd0, 9'b0_1_0_0_0_1_0_0_0);   // clear address registers
    e0 = 2 * NN + 1;
    for (int e = e0; e < e0 + NN * (B + 3); e++) begin
      rel  = e - e0;
      blk  = rel / NN;
      rel1 = rel - NN - 2;
      av = (blk < B);
      d  = av ? a[blk][(rel % NN) / N][rel % N] : 16'd0;
      r0 = av && (rel % N == N - 1);
      s0 = (rel % N == 0);
      p0 = (rel % NN == 0) && blk >= 1 && blk <= B;
      r1 = (rel1 >= 0) && (rel1 % N == N - 1) && (rel1 / NN < B);
      s1 = (rel1 >= 0) && (rel1 % N == 0);
      p1 = (rel1 >= NN) && (rel1 % NN == 0) && (rel1 / NN <= B);
      feed(d, {av, r0, 1'b0, s0, p0, r1, s1, p1, 1'b0});
    end
    @(negedge clk); en = 0;
    checks++;
    if (nout != NN * B) begin failures++; $display("FAIL %0d outputs, exp %0d", nout, NN * B); end
    checks++;
    if (tok_bad != 0 || tok_runs != 2 * N * B) begin
      failures++;
      $display("FAIL token runs %0d (bad %0d)", tok_runs, tok_bad);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
