// rapid_top: a RaPiD array front end with the application pipelines of this
// design behind a common stream interface.
// RaPiD builds a deep pipeline for one application at a time from its cells.
// Here each of the six application mappings is a fixed netlist of RaPiD
// units, and a seventh choice is the generic programmable array. The static
// configuration cfg_app selects which one is connected (a mode switch stands
// for a reconfiguration of the array):
//   0  simple FIR filter      (fir_array, FIR_TAPS cells)
//   1  matrix multiply/1-D DCT (mm_array, DCT_N cells)
//   2  2-D DCT                (dct2d_array, 2*DCT_N cells)
//   3  Apex Bezier curves     (apex_array, 12 cells)
//   4  motion estimation      (me_array, ME_C cells)
//   5  extended FIR filter    (firx_array, FIRX_N cells of FIRX_M taps)
//   6  programmable array     (rapid_fabric, NUM_CELLS generic cells) running
//      whatever configuration was written through the cfg_* port: the data
//      word enters on track 0 and the context bits on control buses 0..8;
//      the result is track 1 of the last cell, written to the output stream
//      in the cycles where control bus 8 leaves the last cell high
// Streams: input stream 0 carries one word per cycle made of a 16-bit data
// value and CTRL_W context bits for the control path (what a global pipeline
// controller would insert; here they come with the data). Input stream 1
// carries the reference-block data used by motion estimation. The output
// stream is 32 bits wide: Apex puts y above x, motion estimation puts the
// best position index above its block difference, the others use the low
// 16 bits.
// Every stream has a FIFO. The selected pipeline advances (en) only while the
// input words it reads this cycle are available and the output FIFO has room
// (the extended FIR reads stream 0 only when its first stage takes a new
// sample, i.e. every FIRX_M cycles); otherwise the whole
// pipeline stalls, exactly as a datapath that reads an empty FIFO or writes a
// full one. Three stream address generators of the memory controller produce
// the external-memory address sequences of the two input streams and the
// output stream; the memory itself is outside this design.
// Interface timing: FIFO push/pop are synchronous, first-word-fall-through.
// cfg_app may only change while the pipelines are idle (between runs).
module rapid_top
  import rapid_pkg::*;
#(
  parameter int unsigned FIR_TAPS   = NUM_CELLS,
  parameter int unsigned FIRX_N     = NUM_CELLS,
  parameter int unsigned FIRX_M     = 4,
  parameter int unsigned DCT_N      = 8,
  parameter int unsigned ME_C       = NUM_CELLS,
  parameter int unsigned ME_R       = NUM_CELLS,
  parameter int unsigned ME_QR      = 2 * NUM_CELLS,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned CTRL_W     = 9,
  parameter int unsigned AW         = 16,
  localparam int unsigned FAB_WAW   = $clog2(rapid_fabric_pkg::CFG_WORDS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [2:0]                 cfg_app,
  // configuration memory of the programmable array (write while idle)
  input  logic                       cfg_we,
  input  logic [3:0]                 cfg_cell,
  input  logic [FAB_WAW-1:0]         cfg_word,
  input  logic [WORD_W-1:0]          cfg_wdata,
  // input stream 0: {context bits, data}
  input  logic                       in0_push,
  input  logic [CTRL_W+WORD_W-1:0]   in0_data,
  output logic                       in0_full,
  // input stream 1: reference-block data (motion estimation)
  input  logic                       in1_push,
  input  logic [WORD_W-1:0]          in1_data,
  output logic                       in1_full,
  // output stream: {second word, first word}
  input  logic                       out_pop,
  output logic [2*WORD_W-1:0]        out_data,
  output logic                       out_empty,
  // memory-controller address generators: streams in0, in1, out
  input  logic [2:0]                 ag_start,
  input  logic [2:0][AW-1:0]         ag_base,
  input  logic [2:0][AW-1:0]         ag_inner_stride,
  input  logic [2:0][15:0]           ag_inner_cnt,
  input  logic [2:0][AW-1:0]         ag_outer_stride,
  input  logic [2:0][15:0]           ag_outer_cnt,
  input  logic [2:0]                 ag_ready,
  output logic [2:0]                 ag_valid,
  output logic [2:0][AW-1:0]         ag_addr,
  output logic [2:0]                 ag_done,
  // status
  output logic                       stall,
  output logic [31:0]                stall_cycles
);
  localparam int unsigned IW = CTRL_W + WORD_W;

  // ---------------- stream FIFOs ----------------
  logic [IW-1:0]       in0_q;
  logic [WORD_W-1:0]   in1_q;
  logic                in0_empty, in1_empty, out_full, pop0, pop1, push_o;
  logic [2*WORD_W-1:0] res;
  logic                res_v;
  logic [$clog2(FIFO_DEPTH):0] unused_c0, unused_c1, unused_c2;

  rapid_stream_fifo #(.WIDTH(IW), .DEPTH(FIFO_DEPTH)) u_in0 (
    .clk, .rst_n, .push(in0_push), .din(in0_data), .full(in0_full),
    .pop(pop0), .dout(in0_q), .empty(in0_empty), .count(unused_c0));
  rapid_stream_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_in1 (
    .clk, .rst_n, .push(in1_push), .din(in1_data), .full(in1_full),
    .pop(pop1), .dout(in1_q), .empty(in1_empty), .count(unused_c1));
  rapid_stream_fifo #(.WIDTH(2*WORD_W), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .push(push_o), .din(res), .full(out_full),
    .pop(out_pop), .dout(out_data), .empty(out_empty), .count(unused_c2));

  // ---------------- stall logic ----------------
  logic              en, need0, need1, firx_rdy;
  logic [WORD_W-1:0] d;
  logic [CTRL_W-1:0] c;
  assign {c, d} = in0_q;
  assign need1  = (cfg_app == 3'd4) && c[0];   // ME word that also reads stream 1
  // the extended FIR's first stage repeats each sample and reads no word then
  assign need0  = !((cfg_app == 3'd5) && !firx_rdy);
  assign en     = !(need0 && in0_empty) && !(need1 && in1_empty) && !out_full;
  assign stall  = !en;
  assign pop0   = en && need0;
  assign pop1   = en && need1;
  assign push_o = en && res_v;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      stall_cycles <= '0;
    else if (!en)    stall_cycles <= stall_cycles + 1;

  // ---------------- application pipelines ----------------
  logic [WORD_W-1:0] fir_y, mm_y, dct_y, ax, ay, me_sad, firx_y;
  logic              fir_v, mm_v, dct_v, apx_v, me_v, firx_v;
  logic [WORD_W-1:0] me_pos;
  logic              en_fir, en_mm, en_dct, en_apx, en_me, en_firx, en_fab;

  assign en_fir = en && (cfg_app == 3'd0);
  assign en_mm  = en && (cfg_app == 3'd1);
  assign en_dct = en && (cfg_app == 3'd2);
  assign en_apx = en && (cfg_app == 3'd3);
  assign en_me  = en && (cfg_app == 3'd4);
  assign en_firx = en && (cfg_app == 3'd5);
  assign en_fab  = en && (cfg_app == 3'd6);

  // FIR context bits: c[0] xv, c[1] ld
  fir_array #(.NUM_TAPS(FIR_TAPS)) u_fir (
    .clk, .rst_n, .en(en_fir), .x_in(d), .xv_in(c[0]), .ld_in(c[1]),
    .y_out(fir_y), .yv_out(fir_v));

  // matrix multiply: c[0] av, c[1] rend, c[2] we
  mm_array #(.N(DCT_N)) u_mm (
    .clk, .rst_n, .en(en_mm), .a_in(d), .av_in(c[0]), .rend_in(c[1]), .we_in(c[2]),
    .y_out(mm_y), .yv_out(mm_v));

  // 2-D DCT: c = {ld, p1, s1, rend1, p0, s0, we, rend0, av} (c[0] = av)
  dct2d_array #(.N(DCT_N)) u_dct (
    .clk, .rst_n, .en(en_dct), .a_in(d), .av_in(c[0]), .rend0_in(c[1]), .we_in(c[2]),
    .s0_in(c[3]), .p0_in(c[4]), .rend1_in(c[5]), .s1_in(c[6]), .p1_in(c[7]),
    .ld_in(c[8]), .y_out(dct_y), .yv_out(dct_v));

  // Apex: c[0] run, c[1] ld, c[5:2] ld_sel
  apex_array u_apx (
    .clk, .rst_n, .en(en_apx), .ld(c[1]), .ld_sel(c[5:2]), .ld_data(d), .run(c[0]),
    .qx(ax), .qy(ay), .qv(apx_v));

  // motion estimation: see me_array for the context bits
  me_array #(.C(ME_C), .R(ME_R), .QR(ME_QR)) u_me (
    .clk, .rst_n, .en(en_me), .ctl(me_ctl_t'(c)), .qw_in(d), .rb_in(in1_q),
    .sad(me_sad), .pos(me_pos), .res_v(me_v));

  // extended FIR: c[0] xv, c[1] ld, c[2] we
  firx_array #(.N(FIRX_N), .M(FIRX_M)) u_firx (
    .clk, .rst_n, .en(en_firx), .x_in(d), .xv_in(c[0]), .ld_in(c[1]),
    .we_in(c[2]), .in_rdy(firx_rdy), .y_out(firx_y), .yv_out(firx_v));

  // programmable array: see the header for its stream connections
  logic [rapid_fabric_pkg::NTRK-1:0][WORD_W-1:0] fab_ti, fab_to;
  logic [rapid_fabric_pkg::NCB-1:0]              fab_ci, fab_co;
  always_comb begin
    fab_ti    = '0;
    fab_ti[0] = d;
    fab_ci    = rapid_fabric_pkg::NCB'(c);
  end
  // only track 1 and control bus 8 of the last cell are used as results
  logic [(rapid_fabric_pkg::NTRK-1)*WORD_W+rapid_fabric_pkg::NCB-2:0] unused_fab;
  assign unused_fab = {fab_to[rapid_fabric_pkg::NTRK-1:2], fab_to[0],
                       fab_co[rapid_fabric_pkg::NCB-1:9], fab_co[7:0]};
  rapid_fabric u_fab (
    .clk, .rst_n, .en(en_fab), .cfg_we, .cfg_cell, .cfg_word, .cfg_wdata,
    .trk_in(fab_ti), .trk_out(fab_to), .cb_in(fab_ci), .cb_out(fab_co));

  always_comb begin
    res   = '0;
    res_v = 1'b0;
    unique case (cfg_app)
      3'd0:    begin res = {16'd0, fir_y};          res_v = fir_v; end
      3'd1:    begin res = {16'd0, mm_y};           res_v = mm_v;  end
      3'd2:    begin res = {16'd0, dct_y};          res_v = dct_v; end
      3'd3:    begin res = {ay, ax};                res_v = apx_v; end
      3'd4:    begin res = {me_pos, me_sad};         res_v = me_v;  end
      3'd5:    begin res = {16'd0, firx_y};         res_v = firx_v; end
      3'd6:    begin res = {16'd0, fab_to[1]};      res_v = fab_co[8]; end
      default: begin res = '0;                      res_v = 1'b0;  end
    endcase
  end

  // ---------------- memory-controller address generators ----------------
  for (genvar s = 0; s < 3; s++) begin : g_ag
    rapid_stream_agen #(.AW(AW), .CW(16)) u_ag (
      .clk, .rst_n, .start(ag_start[s]), .base(ag_base[s]),
      .inner_stride(ag_inner_stride[s]), .inner_cnt(ag_inner_cnt[s]),
      .outer_stride(ag_outer_stride[s]), .outer_cnt(ag_outer_cnt[s]),
      .ready(ag_ready[s]), .valid(ag_valid[s]), .addr(ag_addr[s]), .done(ag_done[s]));
  end
endmodule
