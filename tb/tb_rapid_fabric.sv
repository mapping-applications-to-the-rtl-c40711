// tb_rapid_fabric: self-checking test of the programmable array at its
// default size (16 cells). Configurations are written through the
// configuration port, then run with random stall cycles.
// Program 1, a 16-tap FIR filter laid out as in the one-tap-per-cell mapping:
//   * X on track 0 through a two-register connector per cell;
//   * the weight in datapath register 0, loaded from track 0 while control
//     bus 0 (one register per cell) is high;
//   * multiplier (weight x X) onto track 3, ALU 0 adding it to the partial
//     sum from the left;
//   * Y alternating between tracks 1 and 4 from cell to cell.
//   Every output is compared with the direct convolution, including its
//   latency: Y[n] appears 17 enabled cycles after X[n].
// Program 2 exercises the control path and the other units:
//   * every cell runs the token machine T <= S ? P : T in its lookup table,
//     with S on control bus 0 (one register per cell) and P the previous
//     cell's token on control bus 1, compared each cycle with a model;
//   * cell 0 also accumulates |a - b| of tracks 0 and 5 (ALU 0 subtracts,
//     its registered sign switches ALU 1 between add and subtract);
//   * cell 0 writes track 0 into local memory 0 at incrementing addresses,
//     then clears the address and reads the words back.
module tb_rapid_fabric;
  import rapid_pkg::*;
  import rapid_fabric_pkg::*;
  localparam int NC = 16;
  localparam int NX = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic                        cfg_we = 0;
  logic [3:0]                  cfg_cell = 0;
  logic [$clog2(CFG_WORDS)-1:0] cfg_word = 0;
  logic [15:0]                 cfg_wdata = 0;
  logic [NTRK-1:0][15:0]       trk_in, trk_out;
  logic [NCB-1:0]              cb_in, cb_out;

  rapid_fabric u_dut (.clk, .rst_n, .en, .cfg_we, .cfg_cell, .cfg_word, .cfg_wdata,
                      .trk_in, .trk_out, .cb_in, .cb_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_cfg_t idle_cfg();
    cell_cfg_t c = '0;
    for (int i = 0; i < NALU; i++) begin
      c.alu_a[i] = IN_ZERO; c.alu_b[i] = IN_ZERO;
      c.alu_op[i] = 3'(ALU_ADD); c.alu_op2[i] = 3'(ALU_ADD);
    end
    c.mul_a = IN_ZERO; c.mul_b = IN_ZERO;
    for (int i = 0; i < NREG; i++) c.reg_d[i] = IN_FB;
    for (int i = 0; i < NMEM; i++) begin c.mem_wd[i] = IN_FB; c.mem_ai[i] = IN_ZERO; end
    return c;
  endfunction

  task automatic write_cfg(input int k, input cell_cfg_t c);
    logic [CFG_WORDS*16-1:0] flat = '0;
    flat[CFG_BITS-1:0] = c;
    for (int w = 0; w < CFG_WORDS; w++) begin
      @(negedge clk);
      cfg_we = 1; cfg_cell = 4'(k); cfg_word = $bits(cfg_word)'(w);
      cfg_wdata = flat[16*w +: 16];
    end
    @(negedge clk); cfg_we = 0;
  endtask

  // ---------------- program 1: FIR ----------------
  function automatic cell_cfg_t fir_cfg(int k);
    cell_cfg_t c = idle_cfg();
    int yin = (k % 2 == 0) ? 1 : 4;
    int yout = (k % 2 == 0) ? 4 : 1;
    c.bc_on[0] = 1; c.bc_dly[0] = 2'd2;            // X: doubly pipelined
    c.cb_reg[0] = 1;                                // load bit: singly pipelined
    c.reg_d[0] = insel_t'(0); c.reg_ld[0] = C_CB0;  // weight register
    c.trk_drv[2] = U_REG0;                          // weight onto a local segment
    c.mul_a = insel_t'(2); c.mul_b = insel_t'(0);
    c.trk_drv[3] = U_MLO;                           // product onto a local segment
    c.alu_a[0] = insel_t'(3); c.alu_b[0] = insel_t'(yin);
    c.trk_drv[yout] = usel_t'(1);                   // ALU 0 drives the Y output
    c.bc_on[yout] = 1; c.bc_dly[yout] = 2'd0;
    return c;
  endfunction

  logic [15:0] w [NC];
  logic [15:0] x [NX];
  int cyc = 0, xcyc [NX], stalls = 0;
  logic [15:0] yseen [2000];

  always @(posedge clk) if (rst_n && en) begin
    yseen[cyc] <= trk_out[1];
    cyc <= cyc + 1;
  end

  task automatic feed(input logic [15:0] d, input logic ld, input int idx);
    @(negedge clk);
    trk_in = '0; trk_in[0] = d; cb_in = '0; cb_in[0] = ld;
    en = ($urandom_range(0, 4) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
    end
    if (idx >= 0) xcyc[idx] = cyc;
  endtask

  task automatic run_fir();
    logic [15:0] s;
    foreach (w[j]) w[j] = 16'($urandom_range(0, 255)) - 16'd128;
    foreach (x[i]) x[i] = 16'($urandom_range(0, 1023)) - 16'd512;
    for (int k = 0; k < NC; k++) write_cfg(k, fir_cfg(k));
    // weights W[15] first; the load bit is low from W[0] on
    for (int j = NC - 1; j >= 0; j--) feed(w[j], j != 0, -1);
    foreach (x[i]) feed(x[i], 1'b0, i);
    for (int i = 0; i < NC + 8; i++) feed(16'd0, 1'b0, -1);
    @(negedge clk); en = 0;
    for (int i = NC - 1; i < NX; i++) begin
      s = 0;
      for (int j = 0; j < NC; j++) s += x[i-j] * w[j];
      checks++;
      if (yseen[xcyc[i] + NC + 1] !== s) begin
        failures++;
        $display("FAIL fabric FIR Y[%0d]=%h exp %h", i, yseen[xcyc[i] + NC + 1], s);
      end
    end
  endtask

  // ---------------- program 2: token machine, |a-b| accumulation, memory ----
  function automatic cell_cfg_t tok_cfg(int k);
    cell_cfg_t c = idle_cfg();
    c.cb_reg[0] = 1;                        // S
    c.lut_tab = 8'hCA;                      // y = c ? b : a
    c.lut_in[0] = C_LUTQ;                   // a = T (held token)
    c.lut_in[1] = csrc_t'(C_CB0 + 5'd1);       // b = P (previous cell's token)
    c.lut_in[2] = C_CB0;                    // c = S
    c.cb_drv[1] = C_LUTQ;                   // pass T on as the next cell's P
    for (int t = 7; t <= 8; t++) begin c.bc_on[t] = 1; c.bc_dly[t] = 2'd0; end
    if (k == 0) begin
      c.alu_a[0] = insel_t'(0); c.alu_b[0] = insel_t'(5); c.alu_op[0] = 3'(ALU_SUB);
      c.trk_drv[6] = usel_t'(1);                    // a - b onto track 6
      c.alu_a[1] = IN_FB; c.alu_b[1] = insel_t'(6);
      c.alu_op[1] = 3'(ALU_ADD); c.alu_op2[1] = 3'(ALU_SUB);
      c.alu_opsel[1] = C_SGN0;                      // subtract a negative difference
      c.trk_drv[8] = usel_t'(2);                    // accumulator onto track 8
      c.mem_wd[0] = insel_t'(0);
      c.mem_we[0] = csrc_t'(C_CB0 + 5'd2);
      c.mem_inc[0] = csrc_t'(C_CB0 + 5'd2);
      c.mem_clr[0] = csrc_t'(C_CB0 + 5'd3);
      c.trk_drv[7] = U_MEM0;
    end
    return c;
  endfunction

  logic tok [NC];      // model of every cell's token register
  logic sdl [NC];      // model of the S pipeline (one register per cell)
  int   n_tok = 0;

  task automatic tok_step(input logic s, input logic p, input logic [15:0] a,
                          input logic [15:0] b, input logic [3:0] cbx);
    logic nt [NC];
    @(negedge clk);
    trk_in = '0; trk_in[0] = a; trk_in[5] = b;
    cb_in = '0; cb_in[0] = s; cb_in[1] = p; cb_in[2] = cbx[2]; cb_in[3] = cbx[3];
    en = ($urandom_range(0, 3) != 0);
    while (!en) begin
      stalls++;
      checks++;
      if (cb_out[1] !== tok[NC-1]) begin failures++; $display("FAIL token (stall)"); end
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    checks++;
    if (cb_out[1] !== tok[NC-1]) begin failures++; $display("FAIL token out"); end
    // model the clock edge
    for (int k = 0; k < NC; k++) nt[k] = sdl[k] ? ((k == 0) ? p : tok[k-1]) : tok[k];
    for (int k = NC - 1; k > 0; k--) sdl[k] = sdl[k-1];
    sdl[0] = s;
    for (int k = 0; k < NC; k++) begin
      if (nt[k] && !tok[k]) n_tok++;
      tok[k] = nt[k];
    end
  endtask

  task automatic run_tok();
    logic [15:0] a [24], b [24], acc, mv [8];
    for (int k = 0; k < NC; k++) write_cfg(k, tok_cfg(k));
    foreach (tok[k]) begin tok[k] = 0; sdl[k] = 0; end
    foreach (a[i]) begin a[i] = 16'($urandom_range(0, 2000)); b[i] = 16'($urandom_range(0, 2000)); end
    foreach (mv[i]) mv[i] = 16'($urandom);
    // clear the accumulator's history: two cycles of a = b = 0
    tok_step(0, 0, 0, 0, 4'b1000);
    tok_step(0, 0, 0, 0, 4'b0000);
    acc = u_dut.g_cell[0].u_cell.alu_q[1];
    // token: S every 4 words, P once (one word after the first S); also |a-b| accumulation
    for (int i = 0; i < 24; i++) begin
      tok_step((i % 4) == 0, i == 1, a[i], b[i], 4'b0000);
      acc += (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
    end
    tok_step(0, 0, 0, 0, 4'b0000);
    tok_step(0, 0, 0, 0, 4'b0000);
    checks++;
    if (trk_out[8] !== acc) begin failures++; $display("FAIL |a-b| sum %h exp %h", trk_out[8], acc); end
    // run the S pulses until the token has left the last cell
    for (int i = 0; i < 4 * NC + 8; i++) tok_step((i % 4) == 0, 0, 0, 0, 4'b0000);
    // memory: clear address, write 8 words, clear, read back
    tok_step(0, 0, 0, 0, 4'b1000);
    for (int i = 0; i < 8; i++) tok_step(0, 0, mv[i], 0, 4'b0100);
    tok_step(0, 0, 0, 0, 4'b1000);
    tok_step(0, 0, 0, 0, 4'b0000);   // (the step before a check has been clocked)
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (trk_out[7] !== mv[i]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", i, trk_out[7], mv[i]); end
      // advance the address by writing the same word back
      tok_step(0, 0, mv[i], 0, 4'b0100);
      tok_step(0, 0, 0, 0, 4'b0000);
    end
    @(negedge clk); en = 0;
  endtask

  initial begin
    trk_in = '0; cb_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_fir();
    run_tok();
    $display("INFO fabric stalls=%0d token_moves=%0d", stalls, n_tok);
    checks++;
    if (stalls == 0) failures++;
    checks++;
    if (n_tok < NC) begin failures++; $display("FAIL token moves %0d", n_tok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
