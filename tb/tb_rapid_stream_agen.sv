// tb_rapid_stream_agen: self-checking test of rapid_stream_agen.
// Runs an 8x8 tile walk of a 720-word-wide image and a linear stream with
// back-pressure; every issued address is compared with the nested-loop formula
// and the number of addresses with the loop counts.
module tb_rapid_stream_agen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, ready, valid, done;
  logic [15:0] base, istr, ostr, addr;
  logic [15:0] icnt, ocnt;

  rapid_stream_agen u_dut (.clk, .rst_n, .start, .base, .inner_stride(istr),
    .inner_cnt(icnt), .outer_stride(ostr), .outer_cnt(ocnt), .ready, .valid, .addr, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] b, input logic [15:0] is, input int ic,
                     input logic [15:0] os, input int oc);
    int n = 0;
    @(negedge clk);
    base = b; istr = is; icnt = 16'(ic); ostr = os; ocnt = 16'(oc); start = 1;
    @(posedge clk);
    @(negedge clk); start = 0;
    while (!done) begin
      ready = ($urandom_range(0, 3) != 0);
      #1;
      if (valid && ready) begin
        checks++;
        if (addr !== 16'(b + (n / ic) * os + (n % ic) * is)) begin
          failures++;
          $display("FAIL addr #%0d = %0d", n, addr);
        end
        n++;
      end
      @(posedge clk); @(negedge clk);
    end
    checks++;
    if (n != ic * oc) begin failures++; $display("FAIL count %0d exp %0d", n, ic * oc); end
  endtask

  initial begin
    start = 0; ready = 0; base = 0; istr = 0; ostr = 0; icnt = 0; ocnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(16'd1000, 16'd1, 8, 16'd720, 8);
    run(16'd5, 16'd3, 40, 16'd0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
