// tb_apex_array: self-checking test of the Apex Bezier curve generator.
// Loads dt and four control points per coordinate, runs 300 curve points with
// random stall cycles, and checks each point two ways: bit-exactly against a
// model of the same fixed-point de Casteljau steps, and within +-4 of the
// exact real-valued cubic Bezier. Also checks the 5-cycle latency from a run
// cycle to its point and one point per enabled cycle.
module tb_apex_array;
  localparam int P = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic        ld, run, qv;
  logic [3:0]  ld_sel;
  logic [15:0] ld_data, qx, qy;
  logic [15:0] dt;
  logic [15:0] cp [2][4];
  int          cyc = 0, nout = 0, run_cyc [P], stalls = 0;

  apex_array u_dut (.clk, .rst_n, .en, .ld, .ld_sel, .ld_data, .run, .qx, .qy, .qv);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] wavg(logic [15:0] l, logic [15:0] r, logic [15:0] t);
    logic signed [31:0] p = $signed(16'(r - l)) * $signed(t);
    p = p >>> 15;
    return 16'(p) + l;
  endfunction

  function automatic logic [15:0] model(int c, int p);
    logic [15:0] t = 16'(p * dt);
    logic [15:0] s1, s2, s4, s3, s5;
    s1 = wavg(cp[c][0], cp[c][1], t);
    s2 = wavg(cp[c][1], cp[c][2], t);
    s4 = wavg(cp[c][2], cp[c][3], t);
    s3 = wavg(s1, s2, t);
    s5 = wavg(s2, s4, t);
    return wavg(s3, s5, t);
  endfunction

  function automatic real bezier(int c, int p);
    real t = real'(p * dt) / 32768.0, u = 1.0 - t;
    return u*u*u*$signed(cp[c][0]) + 3.0*u*u*t*$signed(cp[c][1])
         + 3.0*u*t*t*$signed(cp[c][2]) + t*t*t*$signed(cp[c][3]);
  endfunction

  always @(posedge clk) if (rst_n && en) begin
    cyc <= cyc + 1;
    if (qv) begin
      checks++;
      if (qx !== model(0, nout) || qy !== model(1, nout)) begin
        failures++;
        $display("FAIL point %0d (%0d,%0d) exp (%0d,%0d)", nout, $signed(qx), $signed(qy),
                 $signed(model(0, nout)), $signed(model(1, nout)));
      end
      checks++;
      if ($signed(qx) - bezier(0, nout) > 4.0 || bezier(0, nout) - $signed(qx) > 4.0 ||
          $signed(qy) - bezier(1, nout) > 4.0 || bezier(1, nout) - $signed(qy) > 4.0) begin
        failures++;
        $display("FAIL point %0d off the curve", nout);
      end
      checks++;
      if (cyc - run_cyc[nout] != 5) begin
        failures++;
        $display("FAIL point %0d latency %0d", nout, cyc - run_cyc[nout]);
      end
      nout <= nout + 1;
    end
  end

  task automatic cycle_en();
    en = ($urandom_range(0, 4) != 0);
    while (!en) begin
      stalls++;
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
    end
  endtask

  initial begin
    ld = 0; run = 0; ld_sel = 0; ld_data = 0;
    dt = 16'd100;                       // t runs 0 .. 29900/32768
    cp[0] = '{16'd100, 16'd3000, 16'hF000, 16'd2500};
    cp[1] = '{16'hFC18, 16'd4000, 16'd4000, 16'hF830};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      ld = 1; ld_sel = 4'(i);
      ld_data = (i == 0) ? dt : cp[(i - 1) / 4][(i - 1) % 4];
      cycle_en();
    end
    @(negedge clk); ld = 0; en = 1;
    for (int p = 0; p < P; p++) begin
      @(negedge clk);
      run = 1;
      cycle_en();
      run_cyc[p] = cyc;
    end
    @(negedge clk); run = 0;
    repeat (10) begin @(negedge clk); cycle_en(); end
    @(negedge clk); en = 0;
    checks++;
    if (nout != P) begin failures++; $display("FAIL %0d points", nout); end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
