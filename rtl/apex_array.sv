// apex_array: 2-D cubic Bezier curve generator (Apex mapping), twelve cells.
// Each coordinate uses six apex_cells arranged as the de Casteljau triangle:
// stages 1, 2 and 4 average the control-point pairs (V0,V1), (V1,V2) and
// (V2,V3); stage 3 averages stages 1 and 2, stage 5 stages 2 and 4, and stage
// 6 (the root) stages 3 and 5, giving Q(t) = (1-t)^3 V0 + 3(1-t)^2 t V1 +
// 3(1-t) t^2 V2 + t^3 V3. The x and y coordinates are computed by two
// independent six-cell trees side by side.
// Initialisation: with ld high, ld_sel picks the register written from ld_data:
// 0 = dt (broadcast to every cell, also resets every t), 1..4 = x control
// points V0..V3, 5..8 = y control points V0..V3; leaf cells keep the control
// points in two extra registers each.
// Computation: hold run high for one cycle per curve point; no further input is
// needed. The run bit reaches each tree level two cycles after the one below
// (the delay through a node), so all nodes work on the same t. Point p
// (t = p*dt) appears on qx/qy with qv high 5 cycles after the p-th run cycle.
// One point per cycle. en low stalls everything.
module apex_array
  import rapid_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               ld,
  input  logic [3:0]         ld_sel,
  input  logic [WORD_W-1:0]  ld_data,
  input  logic               run,
  output logic [WORD_W-1:0]  qx,
  output logic [WORD_W-1:0]  qy,
  output logic               qv
);
  // run bit pipelined along the control path: level L sees it 2L cycles late
  logic [4:0] run_d;
  logic       dt_ld;

  assign dt_ld = en && ld && (ld_sel == 4'd0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  run_d <= '0;
    else if (en) run_d <= {run_d[3:0], run};

  logic       run_lvl [3];
  assign run_lvl[0] = run;
  assign run_lvl[1] = run_d[1];
  assign run_lvl[2] = run_d[3];
  assign qv = run_d[4];

  logic [WORD_W-1:0] q_root [2];

  for (genvar c = 0; c < 2; c++) begin : g_coord
    logic [WORD_W-1:0] v [4];
    logic [WORD_W-1:0] s [1:6];
    logic [WORD_W-1:0] tt [1:6];

    // leaf control-point registers
    for (genvar i = 0; i < 4; i++) begin : g_cp
      rapid_dpreg #(.NBUS(1)) u_cp (
        .clk, .rst_n, .en, .bus(ld_data),
        .sel((ld && ld_sel == 4'(1 + 4*c + i)) ? 2'd0 : 2'd2), .q(v[i]));
    end

    apex_cell u_s1 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[0]),
                    .l_in(v[0]), .r_in(v[1]), .q_out(s[1]), .t_out(tt[1]));
    apex_cell u_s2 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[0]),
                    .l_in(v[1]), .r_in(v[2]), .q_out(s[2]), .t_out(tt[2]));
    apex_cell u_s3 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[1]),
                    .l_in(s[1]), .r_in(s[2]), .q_out(s[3]), .t_out(tt[3]));
    apex_cell u_s4 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[0]),
                    .l_in(v[2]), .r_in(v[3]), .q_out(s[4]), .t_out(tt[4]));
    apex_cell u_s5 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[1]),
                    .l_in(s[2]), .r_in(s[4]), .q_out(s[5]), .t_out(tt[5]));
    apex_cell u_s6 (.clk, .rst_n, .en, .dt_ld, .dt_in(ld_data), .run(run_lvl[2]),
                    .l_in(s[3]), .r_in(s[5]), .q_out(s[6]), .t_out(tt[6]));

    assign q_root[c] = s[6];
  end

  assign qx = q_root[0];
  assign qy = q_root[1];
endmodule
