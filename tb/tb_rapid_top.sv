// tb_rapid_top: end-to-end test of rapid_top at its default parameters.
// Runs every application mapping in turn through the shared streams,
// switching the static configuration between runs:
//   FIR (16 taps, 48 samples), matrix multiply (8 rows), 2-D DCT (two 8x8
//   blocks), Apex (40 curve points), motion estimation (one 16x16 super RB in
//   a 32x32 window), extended FIR (64 taps on 16 cells, 80 samples), and
//   the programmable array configured through its configuration port as a
//   16-tap FIR filter (one tap per cell, 40 samples).
// The producer pauses at random (input FIFO runs empty: the array stalls) and
// the consumer pauses at random (output FIFO fills: the array stalls). Every
// result is compared with a reference computed here. It also exercises the
// three stream address generators. Each mechanism must occur at least once:
// empty-input stall, full-output stall, mode switch, FIR weight load, matrix
// weight load, DCT transpose token, Apex point, ME window shift, ME parity
// switch (double buffer), extended-FIR weight load, configuration write of
// the programmable array and address generation; a mechanism that never
// occurs counts as a failure.
module tb_rapid_top;
  import rapid_pkg::*;
  import rapid_fabric_pkg::*;
  localparam int CW = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]        cfg_app;
  logic              in0_push, in0_full, in1_push, in1_full, out_pop, out_empty, stall;
  logic [CW+15:0]    in0_data;
  logic [15:0]       in1_data;
  logic [31:0]       out_data, stall_cycles;
  logic [2:0]        ag_start, ag_ready, ag_valid, ag_done;
  logic [2:0][15:0]  ag_base, ag_is, ag_ic, ag_os, ag_oc, ag_addr;
  logic              cfg_we = 0;
  logic [3:0]        cfg_cell = 0;
  logic [$clog2(CFG_WORDS)-1:0] cfg_word = 0;
  logic [15:0]       cfg_wdata = 0;

  rapid_top u_dut (
    .clk, .rst_n, .cfg_app, .cfg_we, .cfg_cell, .cfg_word, .cfg_wdata, .in0_push, .in0_data, .in0_full, .in1_push, .in1_data,
    .in1_full, .out_pop, .out_data, .out_empty,
    .ag_start, .ag_base, .ag_inner_stride(ag_is), .ag_inner_cnt(ag_ic),
    .ag_outer_stride(ag_os), .ag_outer_cnt(ag_oc), .ag_ready, .ag_valid, .ag_addr,
    .ag_done, .stall, .stall_cycles);

  // ---------------- stream driver and collector ----------------
  logic [CW+15:0] q0 [$];
  logic [15:0]    q1 [$];
  logic [31:0]    res [$];
  int n_empty_stall = 0, n_full_stall = 0, n_switch = 0, n_fir_load = 0, n_mm_load = 0;
  int n_token = 0, n_apex = 0, n_qsh = 0, n_par = 0, n_addr = 0, n_firx_load = 0;
  int n_fab_cfg = 0, n_fab_out = 0;

  always @(negedge clk) begin
    in0_push = 1'b0; in1_push = 1'b0; out_pop = 1'b0;
    if (rst_n) begin
      if (q0.size() > 0 && !in0_full && $urandom_range(0, 6) != 0) begin
        in0_push = 1'b1; in0_data = q0[0];
      end
      if (q1.size() > 0 && !in1_full && $urandom_range(0, 6) != 0) begin
        in1_push = 1'b1; in1_data = q1[0];
      end
      // the consumer sometimes pauses for a while, so the output FIFO fills
      out_pop = !out_empty && ((($time / 400) % 5) != 0) && ($urandom_range(0, 9) != 0);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (in0_push) void'(q0.pop_front());
    if (in1_push) void'(q1.pop_front());
    if (out_pop)  res.push_back(out_data);
    if (u_dut.stall && u_dut.in0_empty && !u_dut.out_full) n_empty_stall++;
    if (u_dut.out_full) n_full_stall++;
    if (u_dut.en_fir && u_dut.c[1]) n_fir_load++;
    if (u_dut.en_mm && u_dut.c[2]) n_mm_load++;
    if (u_dut.en_dct && u_dut.u_dct.t[1]) n_token++;
    if (u_dut.en_apx && u_dut.apx_v) n_apex++;
    if (u_dut.en_me && u_dut.c[5]) n_qsh++;
    if (|ag_valid) n_addr++;
    if (u_dut.en_firx && u_dut.c[2]) n_firx_load++;
    if (cfg_we) n_fab_cfg++;
    if (u_dut.en_fab && u_dut.fab_co[8]) n_fab_out++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [CW-1:0] c, input logic [15:0] d);
    q0.push_back({c, d});
  endtask

  // waits until n results are collected and the input stream is used up
  task automatic collect(input int n);
    int guard = 0;
    while ((res.size() < n || q0.size() > 0 || !u_dut.in0_empty) && guard < 100000) begin
      @(posedge clk); guard++;
    end
    repeat (40) @(posedge clk);
  endtask

  task automatic switch_to(input logic [2:0] a);
    @(negedge clk);
    if (cfg_app != a) n_switch++;
    cfg_app = a;
  endtask

  task automatic expect16(input int idx, input logic [15:0] v, input string what);
    checks++;
    if (idx >= res.size() || res[idx][15:0] !== v) begin
      failures++;
      $display("FAIL %s #%0d exp %h", what, idx, v);
    end
  endtask

  localparam int COS64 [8] = '{64, 63, 59, 53, 45, 36, 24, 12};
  function automatic logic [15:0] cosw(int n, int i);
    int k = (i * (2 * n + 1)) % 32;
    if (k < 8)       return 16'(COS64[k]);
    else if (k < 16) return (k == 8) ? 16'd0 : 16'(-COS64[16 - k]);
    else if (k < 24) return 16'(-COS64[k - 16]);
    else             return (k == 24) ? 16'd0 : 16'(COS64[32 - k]);
  endfunction

  // ---------------- FIR ----------------
  task automatic run_fir();
    logic [15:0] w [16], x [48], s;
    res.delete();
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    for (int j = 15; j >= 0; j--) put(9'b10, w[j]);
    foreach (x[i]) put(9'b01, x[i]);
    for (int i = 0; i < 40; i++) put(9'b00, 16'd0);
    collect(48 - 15);
    checks++;
    if (res.size() != 48 - 15) begin failures++; $display("FAIL FIR count %0d", res.size()); end
    for (int i = 15; i < 48; i++) begin
      s = 0;
      for (int j = 0; j < 16; j++) s += x[i-j] * w[j];
      expect16(i - 15, s, "FIR");
    end
  endtask

  // ---------------- extended FIR (16 cells x 4 taps) ----------------
  // context: c[0] xv, c[1] ld, c[2] we; the first stage repeats each sample
  task automatic run_firx();
    localparam int XN = 16, XM = 4, XT = XN * XM, NS = XT + 16;
    logic [15:0] w [XT], x [NS], s;
    res.delete();
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    for (int g = 0; g < XM; g++)
      for (int k = 0; k < XN; k++) put((k == 0) ? 9'b110 : 9'b010, w[XT-1-(k*XM+g)]);
    for (int k = 0; k < XN; k++) put(9'b010, 16'd0);
    put(9'b0000, 16'd0);
    foreach (x[i]) put(9'b001, x[i]);
    for (int i = 0; i < 40; i++) put(9'b0000, 16'd0);
    collect(NS);
    checks++;
    if (res.size() != NS) begin failures++; $display("FAIL FIRX count %0d", res.size()); end
    for (int i = XT - 1; i < NS; i++) begin
      s = 0;
      for (int j = 0; j < XT; j++) s += x[i-j] * w[j];
      expect16(i, s, "FIRX");
    end
  endtask

  // ---------------- programmable array as a 16-tap FIR ----------------
  // cell k: X on track 0 through two connector registers, weight register 0
  // loaded while control bus 0 (c[0], one register per cell) is high, product
  // onto track 3, ALU 0 adds it to Y, Y alternates between tracks 1 and 4.
  // Control bus 8 (c[8]) has one register per cell and marks the output words.
  function automatic cell_cfg_t fab_fir_cfg(int k);
    cell_cfg_t f = '0;
    int yin = (k % 2 == 0) ? 1 : 4;
    int yout = (k % 2 == 0) ? 4 : 1;
    for (int i = 0; i < NALU; i++) begin
      f.alu_a[i] = IN_ZERO; f.alu_b[i] = IN_ZERO;
      f.alu_op[i] = 3'(ALU_ADD); f.alu_op2[i] = 3'(ALU_ADD);
    end
    for (int i = 0; i < NREG; i++) f.reg_d[i] = IN_FB;
    for (int i = 0; i < NMEM; i++) begin f.mem_wd[i] = IN_FB; f.mem_ai[i] = IN_ZERO; end
    f.bc_on[0] = 1; f.bc_dly[0] = 2'd2;
    f.cb_reg[0] = 1; f.cb_reg[8] = 1;
    f.reg_d[0] = insel_t'(0); f.reg_ld[0] = C_CB0;
    f.trk_drv[2] = U_REG0;
    f.mul_a = insel_t'(2); f.mul_b = insel_t'(0);
    f.trk_drv[3] = U_MLO;
    f.alu_a[0] = insel_t'(3); f.alu_b[0] = insel_t'(yin);
    f.trk_drv[yout] = U_ALU0;
    f.bc_on[yout] = 1; f.bc_dly[yout] = 2'd0;
    return f;
  endfunction

  task automatic run_fab();
    localparam int NX = 40;
    logic [15:0] w [16], x [NX], s;
    logic [CFG_WORDS*16-1:0] flat;
    res.delete();
    for (int k = 0; k < 16; k++) begin
      flat = '0;
      flat[CFG_BITS-1:0] = fab_fir_cfg(k);
      for (int wd = 0; wd < CFG_WORDS; wd++) begin
        @(negedge clk);
        cfg_we = 1; cfg_cell = 4'(k); cfg_word = $bits(cfg_word)'(wd);
        cfg_wdata = flat[16*wd +: 16];
      end
    end
    @(negedge clk); cfg_we = 0;
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    for (int j = 15; j >= 0; j--) put((j != 0) ? 9'h001 : 9'h000, w[j]);
    // Y[i] leaves 17 cycles after X[i], the output mark 16 cycles after its
    // word: mark the word after each sample
    put(9'h000, x[0]);
    for (int i = 1; i < NX; i++) put(9'h100, x[i]);
    put(9'h100, 16'd0);
    for (int i = 0; i < 20; i++) put(9'h000, 16'd0);
    collect(NX);
    checks++;
    if (res.size() != NX) begin failures++; $display("FAIL fabric count %0d", res.size()); end
    for (int i = 15; i < NX; i++) begin
      s = 0;
      for (int j = 0; j < 16; j++) s += x[i-j] * w[j];
      expect16(i, s, "fabric FIR");
    end
  endtask

  // ---------------- matrix multiply ----------------
  task automatic run_mm();
    logic [15:0] a [8][8], s;
    res.delete();
    foreach (a[r, n]) a[r][n] = 16'($urandom_range(0, 255)) - 16'd128;
    for (int n = 0; n < 8; n++)
      for (int k = 0; k < 8; k++) put({6'b0, k == 0, 2'b00}, cosw(n, 7 - k));
    put(9'b010, 16'd0);
    for (int r = 0; r < 8; r++)
      for (int n = 0; n < 8; n++) put({7'b0, n == 7, 1'b1}, a[r][n]);
    for (int i = 0; i < 24; i++) put(9'b0, 16'd0);
    collect(64);
    checks++;
    if (res.size() != 64) begin failures++; $display("FAIL MM count %0d", res.size()); end
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      s = 0;
      for (int n = 0; n < 8; n++) s += a[r][n] * cosw(n, c);
      expect16(r * 8 + c, s, "MM");
    end
  endtask

  // ---------------- 2-D DCT ----------------
  task automatic run_dct();
    localparam int B = 2;
    logic [15:0] a [B][8][8], s;
    int rel1, blk;
    logic av, r0, s0, p0, r1, s1, p1;
    res.delete();
    foreach (a[b, m, n]) a[b][m][n] = 16'($urandom_range(0, 63)) - 16'd32;
    for (int e = 0; e < 128; e++) put({1'b1, 5'b0, (e % 16) == 0, 2'b00}, cosw(e / 16, e % 8));
    put(9'b000100010, 16'd0);
    for (int rel = 0; rel < 64 * (B + 3); rel++) begin
      blk  = rel / 64;
      rel1 = rel - 66;
      av = (blk < B);
      r0 = av && (rel % 8 == 7);
      s0 = (rel % 8 == 0);
      p0 = (rel % 64 == 0) && blk >= 1 && blk <= B;
      r1 = (rel1 >= 0) && (rel1 % 8 == 7) && (rel1 / 64 < B);
      s1 = (rel1 >= 0) && (rel1 % 8 == 0);
      p1 = (rel1 >= 64) && (rel1 % 64 == 0) && (rel1 / 64 <= B);
      put({1'b0, p1, s1, r1, p0, s0, 1'b0, r0, av}, av ? a[blk][(rel % 64) / 8][rel % 8] : 16'd0);
    end
    collect(64 * B);
    checks++;
    if (res.size() != 64 * B) begin failures++; $display("FAIL DCT count %0d", res.size()); end
    for (int b = 0; b < B; b++) for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      s = 0;
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < 8; n++) s += cosw(m, i) * a[b][m][n] * cosw(n, j);
      expect16(b * 64 + i * 8 + j, s, "DCT");
    end
  endtask

  // ---------------- Apex ----------------
  function automatic logic [15:0] wavg(logic [15:0] l, logic [15:0] r, logic [15:0] t);
    logic signed [31:0] p = $signed(16'(r - l)) * $signed(t);
    p = p >>> 15;
    return 16'(p) + l;
  endfunction
  task automatic run_apex();
    logic [15:0] cp [2][4], t, v [5], qxy [2];
    logic [15:0] dt = 16'd700;
    res.delete();
    cp[0] = '{16'd0, 16'd1000, 16'd3000, 16'd4000};
    cp[1] = '{16'd500, 16'hF000, 16'd2000, 16'd100};
    put({3'b0, 4'd0, 2'b10}, dt);
    for (int i = 0; i < 8; i++) put({3'b0, 4'(i + 1), 2'b10}, cp[i / 4][i % 4]);
    for (int p = 0; p < 40; p++) put(9'b1, 16'd0);
    for (int i = 0; i < 8; i++) put(9'b0, 16'd0);
    collect(40);
    checks++;
    if (res.size() != 40) begin failures++; $display("FAIL APEX count %0d", res.size()); end
    for (int p = 0; p < 40; p++) begin
      t = 16'(p * dt);
      for (int c = 0; c < 2; c++) begin
        v[0] = wavg(cp[c][0], cp[c][1], t);
        v[1] = wavg(cp[c][1], cp[c][2], t);
        v[2] = wavg(cp[c][2], cp[c][3], t);
        v[3] = wavg(v[0], v[1], t);
        v[4] = wavg(v[1], v[2], t);
        qxy[c] = wavg(v[3], v[4], t);
      end
      checks++;
      if (p >= res.size() || res[p] !== {qxy[1], qxy[0]}) begin
        failures++;
        $display("FAIL APEX point %0d", p);
      end
    end
  endtask

  // ---------------- motion estimation ----------------
  int rbm [16][16];
  int qwm [32][32];
  int rb_idx;

  task automatic me_word(input me_ctl_t w, input int qv, input int par);
    w.par = 1'(par);
    if (rb_idx < 256) begin
      w.rbv = 1'b1;
      w.rbwe = (rb_idx % 16 == 0);
      q1.push_back(16'(rbm[rb_idx / 16][rb_idx % 16]));
      rb_idx++;
    end
    put(9'(w), 16'(qv));
  endtask

  task automatic run_me();
    int exp_sad [4], exp_pos [4], acc [4], v, q;
    me_ctl_t w;
    res.delete();
    rb_idx = 0;
    foreach (rbm[r, c]) rbm[r][c] = $urandom_range(0, 255);
    foreach (qwm[y, x]) qwm[y][x] = $urandom_range(0, 255);
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) qwm[10 + r][16 - 7 + c] = rbm[r][c];
    for (int k = 0; k < 4; k++) begin exp_sad[k] = 1 << 30; exp_pos[k] = 0; end
    for (int h = 0; h <= 16; h++) for (int s = 0; s < 17; s++) begin
      for (int k = 0; k < 4; k++) acc[k] = 0;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        q = (r >= 8) * 2 + (c >= 8);
        v = rbm[r][c] - qwm[s + r][16 - h + c];
        acc[q] += (v < 0) ? -v : v;
      end
      for (int k = 0; k < 4; k++)
        if (acc[k] < exp_sad[k]) begin exp_sad[k] = acc[k]; exp_pos[k] = h * 17 + s; end
    end
    // window preload with the RB preload overlapping it (parity 0)
    for (int j = 0; j < 16; j++) begin
      w = '0; w.hsh = 1; me_word(w, 0, 0);
      for (int a = 0; a < 32; a++) begin
        w = '0; w.qsh = 1; me_word(w, qwm[a][31 - j], 0);
      end
    end
    // parity 1: compute with the preloaded buffer
    for (int h = 0; h <= 16; h++) begin
      if (h > 0) begin
        w = '0; w.hsh = 1; me_word(w, 0, 1);
        for (int a = 0; a < 32; a++) begin
          w = '0; w.qsh = 1; me_word(w, qwm[a][16 - h], 1);
        end
      end
      w = '0; w.hsh = 1; me_word(w, 0, 1);
      for (int s = 0; s < 17; s++) for (int r = 0; r < 16; r++) begin
        w = '0; w.act = 1; w.bdend = (r == 15); me_word(w, 0, 1);
      end
    end
    for (int i = 0; i < 18; i++) me_word('0, 0, 1);
    w = '0; w.emit = 1;
    for (int i = 0; i < 4; i++) me_word(w, 0, 1);
    for (int i = 0; i < 20; i++) me_word('0, 0, 1);
    collect(4);
    if (u_dut.u_me.g_stage[15].u_cell.par_q) n_par++;
    checks++;
    if (res.size() != 4) begin failures++; $display("FAIL ME count %0d", res.size()); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (k >= res.size() || res[k] !== {16'(exp_pos[k]), 16'(exp_sad[k])}) begin
        failures++;
        $display("FAIL ME block %0d exp pos %0d sad %0d", k, exp_pos[k], exp_sad[k]);
      end
    end
    checks++;
    if (exp_sad[0] != 0) begin failures++; $display("FAIL planted ME match"); end
  endtask

  // ---------------- address generators ----------------
  task automatic run_agen();
    int n = 0, guard = 0;
    @(negedge clk);
    ag_base = '{16'd0, 16'd4096, 16'd100}; ag_is = '{16'd1, 16'd1, 16'd1};
    ag_ic = '{16'd8, 16'd16, 16'd8};       ag_os = '{16'd64, 16'd720, 16'd720};
    ag_oc = '{16'd8, 16'd16, 16'd8};       ag_start = 3'b111; ag_ready = 3'b111;
    @(negedge clk); ag_start = 3'b000;
    while (ag_done != 3'b111 && guard < 1000) begin
      if (ag_valid[1]) begin
        checks++;
        if (ag_addr[1] !== 16'(4096 + (n / 16) * 720 + n % 16)) failures++;
        n++;
      end
      @(negedge clk); guard++;
    end
    checks++;
    if (n != 256) begin failures++; $display("FAIL agen count %0d", n); end
  endtask

  initial begin
    cfg_app = 3'd0; in0_data = '0; in1_data = '0;
    ag_start = '0; ag_ready = '0; ag_base = '0; ag_is = '0; ag_ic = '0; ag_os = '0; ag_oc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    switch_to(3'd0); run_fir();
    switch_to(3'd1); run_mm();
    switch_to(3'd2); run_dct();
    switch_to(3'd3); run_apex();
    switch_to(3'd4); run_me();
    switch_to(3'd5); run_firx();
    switch_to(3'd6); run_fab();
    run_agen();
    $display("INFO stalls empty=%0d full=%0d switches=%0d fir_load=%0d mm_load=%0d token=%0d apex=%0d qsh=%0d par=%0d addr=%0d firx_load=%0d fab_cfg=%0d fab_out=%0d stall_cycles=%0d",
             n_empty_stall, n_full_stall, n_switch, n_fir_load, n_mm_load, n_token, n_apex,
             n_qsh, n_par, n_addr, n_firx_load, n_fab_cfg, n_fab_out, stall_cycles);
    if (n_empty_stall == 0) begin failures++; $display("FAIL no empty stall"); end
    if (n_full_stall == 0)  begin failures++; $display("FAIL no full stall"); end
    if (n_switch < 6)       begin failures++; $display("FAIL mode switches"); end
    if (n_fir_load == 0)    begin failures++; $display("FAIL no FIR load"); end
    if (n_mm_load == 0)     begin failures++; $display("FAIL no MM load"); end
    if (n_token == 0)       begin failures++; $display("FAIL no token"); end
    if (n_apex == 0)        begin failures++; $display("FAIL no apex point"); end
    if (n_qsh == 0)         begin failures++; $display("FAIL no QW shift"); end
    if (n_par == 0)         begin failures++; $display("FAIL no parity switch"); end
    if (n_addr == 0)        begin failures++; $display("FAIL no addresses"); end
    if (n_firx_load == 0)   begin failures++; $display("FAIL no FIRX load"); end
    if (n_fab_cfg == 0 || n_fab_out == 0) begin failures++; $display("FAIL no fabric run"); end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
