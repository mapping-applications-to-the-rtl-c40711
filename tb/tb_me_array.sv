// tb_me_array: self-checking test of the motion-estimation mapping at its
// default size (16 stages, 16x16 super RB of four 8x8 blocks, 32-row window).
// Acting as the stream controller it preloads the super RB into the idle RB
// buffer while the 32x32 super query window is shifted in, switches the
// parity, runs all 17x17 block differences with random stall cycles, and
// reads back the four best matches. Each reported minimum and its position
// index are compared with a full search computed here over random 8-bit
// pixels (one planted exact match for one block, so one minimum is 0).
module tb_me_array;
  import rapid_pkg::*;
  localparam int C = 16, R = 16, QR = 32;
  localparam int NS = QR - R + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  me_ctl_t     ctl;
  logic [15:0] qw_in, rb_in, sad, pos;
  logic        res_v;
  int          rbm [R][C];
  int          qwm [QR][2*C];
  int          exp_sad [4], exp_pos [4];
  int          nres = 0, stalls = 0, rb_idx = 0, par = 0;

  me_array #(.C(C), .R(R), .QR(QR)) u_dut (.clk, .rst_n, .en, .ctl, .qw_in, .rb_in,
                                          .sad, .pos, .res_v);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en && res_v) begin
    checks++;
    if (nres < 4 && (sad !== 16'(exp_sad[nres]) || pos !== 16'(exp_pos[nres]))) begin
      failures++;
      $display("FAIL block %0d sad=%0d pos=%0d exp sad=%0d pos=%0d", nres, sad, pos,
               exp_sad[nres], exp_pos[nres]);
    end
    nres <= nres + 1;
  end

  // one stream word; RB preload words are added while rb_idx < R*C
  task automatic word(input me_ctl_t w, input int qv);
    @(negedge clk);
    ctl = w;
    ctl.par = 1'(par);
    qw_in = 16'(qv);
    if (rb_idx < R * C) begin
      ctl.rbv  = 1'b1;
      ctl.rbwe = (rb_idx % C == 0);
      rb_in    = 16'(rbm[rb_idx / C][rb_idx % C]);
      rb_idx++;
    end else rb_in = 16'd0;
    en = ($urandom_range(0, 5) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
    end
  endtask

  task automatic column_shift(input int x);
    me_ctl_t w = '0;
    w.hsh = 1'b1;
    word(w, 0);
    w = '0;
    w.qsh = 1'b1;
    for (int a = 0; a < QR; a++) word(w, qwm[a][x]);
  endtask

  initial begin
    me_ctl_t w;
    int v, q;
    ctl = '0; qw_in = 0; rb_in = 0;
    foreach (rbm[r, c]) rbm[r][c] = $urandom_range(0, 255);
    foreach (qwm[y, x]) qwm[y][x] = $urandom_range(0, 255);
    // plant the lower-right block at column position h=5, start row s=3
    for (int r = R / 2; r < R; r++) for (int c = C / 2; c < C; c++)
      qwm[3 + r][C - 5 + c] = rbm[r][c];
    // reference full search
    for (int k = 0; k < 4; k++) begin exp_sad[k] = 1 << 30; exp_pos[k] = 0; end
    for (int h = 0; h <= C; h++) for (int s = 0; s < NS; s++) begin
      int acc [4];
      for (int k = 0; k < 4; k++) acc[k] = 0;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        q = (r >= R / 2) * 2 + (c >= C / 2);
        v = rbm[r][c] - qwm[s + r][C - h + c];
        acc[q] += (v < 0) ? -v : v;
      end
      for (int k = 0; k < 4; k++)
        if (acc[k] < exp_sad[k]) begin exp_sad[k] = acc[k]; exp_pos[k] = h * NS + s; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // window preload (RB preload into buffer 1 overlaps it), then parity 1
    for (int j = 0; j < C; j++) column_shift(2 * C - 1 - j);
    par = 1;
    for (int h = 0; h <= C; h++) begin
      if (h > 0) column_shift(C - h);
      w = '0; w.hsh = 1'b1; word(w, 0);
      for (int s = 0; s < NS; s++)
        for (int r = 0; r < R; r++) begin
          w = '0; w.act = 1'b1; w.bdend = (r == R - 1);
          word(w, 0);
        end
    end
    w = '0;
    for (int i = 0; i < C + 2; i++) word(w, 0);
    w.emit = 1'b1;
    for (int i = 0; i < 4; i++) word(w, 0);
    w = '0;
    for (int i = 0; i < C + 4; i++) word(w, 0);
    @(negedge clk); en = 0;
    checks++;
    if (nres != 4) begin failures++; $display("FAIL %0d results", nres); end
    checks++;
    if (exp_sad[3] != 0) begin failures++; $display("FAIL planted match not minimal"); end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
