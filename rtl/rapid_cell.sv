// rapid_cell: one programmable RaPiD cell. The units are three ALUs, one
// multiplier, six datapath registers and three 32-word local memories, on
// NTRK segmented 16-bit tracks, plus NCB pipelined 1-bit control buses with a
// 3-input lookup table.
// How it works. The static configuration (cfg) decides everything that does
// not change during a run:
//   * which track segment, zero line or feedback line each unit input reads;
//   * which unit output drives each track segment;
//   * how each bus connector at the right edge joins the segment to the next
//     cell's: open, or left to right through 0 to 3 registers;
//   * the ALU functions;
//   * the multiplier shift;
//   * where each dynamic control input comes from.
// Dynamic control (register load, memory write / address increment / clear
// / load, choice between two ALU functions) comes from the control buses,
// the lookup table, or the registered ALU signs. The control buses pass
// through every cell, each with an optional register, and can be overwritten
// by a control source, for example to pass a token to the next cell.
// Timing: ALU and multiplier outputs are always registered before they
// reach a track, so data spends at least one cycle in every unit it passes.
// The memory read is combinational from the address register. en low
// stalls every register and memory.
// Follows the document: the unit mix and counts, n:1 input multiplexers with
// zero and feedback lines, output drivers onto track segments, bus connectors
// with up to three registers, the incrementing address register, control
// buses with lookup tables fed by control bits, ALU status and feedback.
// This design's own choices:
//   * Unit outputs are always registered (optional in RaPiD), so a
//     configuration can never form a combinational loop.
//   * Bus connectors only drive left to right.
//   * Every track has one segment per cell.
//   * The lookup table cannot read its own unregistered output.
//   * The configuration encoding is this design's own.
module rapid_cell
  import rapid_pkg::*;
  import rapid_fabric_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  cell_cfg_t                    cfg,
  input  logic [NTRK-1:0][WORD_W-1:0]  trk_l,   // from the left connectors
  output logic [NTRK-1:0][WORD_W-1:0]  trk_r,   // right connectors' outputs
  input  logic [NCB-1:0]               cb_l,
  output logic [NCB-1:0]               cb_r
);
  logic [NTRK-1:0][WORD_W-1:0] seg;
  logic [14:0][WORD_W-1:0]     uo;          // unit outputs, index = usel_t
  logic [NALU-1:0][WORD_W-1:0] alu_y, alu_q, alu_a, alu_b;
  logic [NALU-1:0]             sign_q, alu_sign;
  logic [2*WORD_W-1:0]         mul_q, mul_p;
  logic [WORD_W-1:0]           mul_hi, mul_lo;
  logic [NREG-1:0][WORD_W-1:0] reg_q;
  logic [NMEM-1:0][WORD_W-1:0] mem_rd;
  logic [NCB-1:0]              cb_q, cb;
  logic                        lut_c, lut_q;
  logic [2:0]                  lut_x;
  logic [NALU-1:0]             unused_c, unused_z;
  logic [NMEM-1:0][4:0]        unused_addr;
  logic [NMEM-1:0][WORD_W-6:0] unused_ai;

  function automatic logic [WORD_W-1:0] pick(insel_t s, logic [NTRK-1:0][WORD_W-1:0] t,
                                             logic [WORD_W-1:0] fb);
    if (s < insel_t'(NTRK)) return t[s];
    else if (s == IN_ZERO)  return '0;
    else                    return fb;
  endfunction

  function automatic logic ctl(csrc_t s, logic [NCB-1:0] b, logic [NALU-1:0] sg,
                               logic lc, logic lq);
    if (s == C_ZERO)                        return 1'b0;
    else if (s == C_ONE)                    return 1'b1;
    else if (s < C_SGN0)                    return b[4'(s - C_CB0)];
    else if (s < C_LUT)                     return sg[2'(s - C_SGN0)];
    else if (s == C_LUT)                    return lc;
    else if (s == C_LUTQ)                   return lq;
    else                                    return 1'b0;
  endfunction

  // ---------------- control path ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cb_q <= '0;
    else if (en) cb_q <= cb_l;
  for (genvar j = 0; j < NCB; j++) begin : g_cb
    assign cb[j] = cfg.cb_reg[j] ? cb_q[j] : cb_l[j];
  end

  // the table's inputs may not take its own unregistered output
  for (genvar i = 0; i < 3; i++) begin : g_lutin
    assign lut_x[i] = ctl(cfg.lut_in[i], cb, sign_q, 1'b0, lut_q);
  end
  assign lut_c = cfg.lut_tab[lut_x];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  lut_q <= 1'b0;
    else if (en) lut_q <= lut_c;

  for (genvar j = 0; j < NCB; j++) begin : g_cbo
    assign cb_r[j] = (cfg.cb_drv[j] == C_ZERO) ? cb[j]
                                               : ctl(cfg.cb_drv[j], cb, sign_q, lut_c, lut_q);
  end

  // ---------------- tracks ----------------
  for (genvar t = 0; t < NTRK; t++) begin : g_seg
    assign seg[t] = (cfg.trk_drv[t] == U_NONE) ? trk_l[t] : uo[cfg.trk_drv[t]];
  end

  // ---------------- ALUs ----------------
  for (genvar i = 0; i < NALU; i++) begin : g_alu
    alu_op_e op;
    assign alu_a[i] = pick(cfg.alu_a[i], seg, alu_q[i]);
    assign alu_b[i] = pick(cfg.alu_b[i], seg, alu_q[i]);
    assign op = alu_op_e'(ctl(cfg.alu_opsel[i], cb, sign_q, lut_c, lut_q) ? cfg.alu_op2[i]
                                                                           : cfg.alu_op[i]);
    rapid_alu u_alu (
      .op, .a(alu_a[i]), .b(alu_b[i]), .cin(1'b0),
      .y(alu_y[i]), .cout(unused_c[i]), .sign(alu_sign[i]), .zero(unused_z[i]));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        alu_q[i] <= '0; sign_q[i] <= 1'b0;
      end else if (en) begin
        alu_q[i] <= alu_y[i]; sign_q[i] <= alu_sign[i];
      end
  end

  // ---------------- multiplier ----------------
  rapid_mult #(.SHIFT(0), .PIPE(1'b0)) u_mul (
    .clk, .rst_n, .en,
    .a(pick(cfg.mul_a, seg, mul_q[WORD_W-1:0])), .b(pick(cfg.mul_b, seg, mul_q[WORD_W-1:0])),
    .hi(mul_hi), .lo(mul_lo));
  assign mul_p = $signed({mul_hi, mul_lo}) >>> cfg.mul_shift;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mul_q <= '0;
    else if (en) mul_q <= mul_p;

  // ---------------- datapath registers ----------------
  for (genvar i = 0; i < NREG; i++) begin : g_reg
    logic ld;
    assign ld = ctl(cfg.reg_ld[i], cb, sign_q, lut_c, lut_q);
    rapid_dpreg #(.NBUS(NTRK)) u_reg (
      .clk, .rst_n, .en(en && ld), .bus(seg), .sel(cfg.reg_d[i]), .q(reg_q[i]));
  end

  // ---------------- local memories ----------------
  for (genvar i = 0; i < NMEM; i++) begin : g_mem
    logic [WORD_W-1:0] ai;
    assign ai = pick(cfg.mem_ai[i], seg, '0);
    assign unused_ai[i] = ai[WORD_W-1:5];   // 32-word memories use 5 address bits
    rapid_local_mem u_mem (
      .clk, .rst_n, .en,
      .addr_clr(ctl(cfg.mem_clr[i], cb, sign_q, lut_c, lut_q)),
      .addr_ld(ctl(cfg.mem_ld[i], cb, sign_q, lut_c, lut_q)),
      .addr_in(ai[4:0]),
      .addr_inc(ctl(cfg.mem_inc[i], cb, sign_q, lut_c, lut_q)),
      .we(ctl(cfg.mem_we[i], cb, sign_q, lut_c, lut_q)),
      .wdata(pick(cfg.mem_wd[i], seg, mem_rd[i])),
      .rdata(mem_rd[i]), .addr(unused_addr[i]));
  end

  // ---------------- unit outputs ----------------
  always_comb begin
    uo[0] = '0;
    for (int i = 0; i < NALU; i++) uo[1 + i] = alu_q[i];
    uo[U_MHI] = mul_q[2*WORD_W-1:WORD_W];
    uo[U_MLO] = mul_q[WORD_W-1:0];
    for (int i = 0; i < NREG; i++) uo[int'(U_REG0) + i] = reg_q[i];
    for (int i = 0; i < NMEM; i++) uo[int'(U_MEM0) + i] = mem_rd[i];
  end

  // ---------------- bus connectors (left to right, 0..3 registers) --------
  for (genvar t = 0; t < NTRK; t++) begin : g_bc
    logic [2:0][WORD_W-1:0] pipe;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  pipe <= '0;
      else if (en) pipe <= {pipe[1:0], seg[t]};
    always_comb begin
      if (!cfg.bc_on[t])           trk_r[t] = '0;
      else if (cfg.bc_dly[t] == 0) trk_r[t] = seg[t];
      else                         trk_r[t] = pipe[cfg.bc_dly[t] - 2'd1];
    end
  end
endmodule
