// tb_mm_array: self-checking test of the matrix-multiply / 1-D DCT mapping at
// its default size (N = 8). Loads an 8x8 integer weight matrix (a scaled
// cosine table: round(64*cos(pi*i*(2n+1)/16))), multiplies 24 random rows
// (three 8x8 blocks) with random stalls, and compares every output word with
// A x W computed here, in row-major order. Also checks the row latency
// (first result N+2 enabled cycles after the row's last element) and that
// results leave back to back, N per row.
module tb_mm_array;
  localparam int N = 8;
  localparam int ROWS = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic [15:0] a_in, y_out;
  logic        av_in, rend_in, we_in, yv_out;
  logic [15:0] w [N][N];
  logic [15:0] a [ROWS][N];
  int          cyc = 0, nout = 0, rowend_cyc [ROWS], stalls = 0;

  // scaled 8-point DCT weights, w[n][i] = round(64*cos(pi*i*(2n+1)/16))
  localparam int COS64 [8] = '{64, 63, 59, 53, 45, 36, 24, 12};
  function automatic int cosw(int n, int i);
    int k = (i * (2 * n + 1)) % 32;   // angle in units of pi/16
    if (k < 8)       return  COS64[k];
    else if (k < 16) return (k == 8) ? 0 : -COS64[16 - k];
    else if (k < 24) return -COS64[k - 16];
    else             return (k == 24) ? 0 : COS64[32 - k];
  endfunction

  mm_array #(.N(N)) u_dut (.clk, .rst_n, .en, .a_in, .av_in, .rend_in, .we_in, .y_out, .yv_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_y(int r, int c);
    logic [15:0] s = 0;
    for (int n = 0; n < N; n++) s += a[r][n] * w[n][c];
    return s;
  endfunction

  always @(posedge clk) if (rst_n && en) begin
    cyc <= cyc + 1;
    if (yv_out) begin
      automatic int r = nout / N, c = nout % N;
      checks++;
      if (y_out !== ref_y(r, c)) begin
        failures++;
        $display("FAIL Y[%0d][%0d]=%0d exp %0d", r, c, $signed(y_out), $signed(ref_y(r, c)));
      end
      if (c == 0) begin
        checks++;
        if (cyc - rowend_cyc[r] != N + 2) begin
          failures++;
          $display("FAIL row %0d latency %0d", r, cyc - rowend_cyc[r]);
        end
      end
      nout <= nout + 1;
    end
  end

  task automatic feed(input logic [15:0] d, input logic v, input logic re, input logic wr, input int row);
    @(negedge clk);
    a_in = d; av_in = v; rend_in = re; we_in = wr;
    en = ($urandom_range(0, 5) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
    end
    if (row >= 0) rowend_cyc[row] = cyc;
  endtask

  initial begin
    a_in = 0; av_in = 0; rend_in = 0; we_in = 0;
    for (int n = 0; n < N; n++) for (int i = 0; i < N; i++) w[n][i] = 16'(cosw(n, i));
    for (int r = 0; r < ROWS; r++) for (int n = 0; n < N; n++)
      a[r][n] = 16'($urandom_range(0, 255)) - 16'd128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: row n of W reversed, write enable on the first word of each row
    for (int n = 0; n < N; n++)
      for (int k = 0; k < N; k++) feed(w[n][N-1-k], 1'b0, 1'b0, k == 0, -1);
    feed(16'd0, 1'b0, 1'b1, 1'b0, -1);    // clear the address registers
    for (int r = 0; r < ROWS; r++)
      for (int n = 0; n < N; n++) feed(a[r][n], 1'b1, n == N - 1, 1'b0, (n == N - 1) ? r : -1);
    for (int i = 0; i < 3 * N; i++) feed(16'd0, 1'b0, 1'b0, 1'b0, -1);
    @(negedge clk); en = 0;
    checks++;
    if (nout != ROWS * N) begin failures++; $display("FAIL %0d outputs", nout); end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
