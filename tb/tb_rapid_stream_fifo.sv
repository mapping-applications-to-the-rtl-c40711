// tb_rapid_stream_fifo: self-checking test of rapid_stream_fifo.
// A producer and a consumer push and pop at random, never violating the
// stream protocol (no push when full, no pop when empty); the popped words
// must come out in order, and the FIFO must report full after DEPTH pushes
// without pops and empty after draining.
module tb_rapid_stream_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push, pop, full, empty;
  logic [15:0] din, dout;
  logic [3:0]  count;
  logic [15:0] model [$];
  int          fulls = 0;

  rapid_stream_fifo #(.WIDTH(16), .DEPTH(8)) u_dut (
    .clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill to full
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); push = 1; din = 16'(100 + i);
      model.push_back(din);
      @(posedge clk);
    end
    @(negedge clk); push = 0; #1;
    checks++;
    if (!full || count !== 4'd8) begin failures++; $display("FAIL not full"); end
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      #1;
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == 8)) begin
        failures++; $display("FAIL flags size=%0d", model.size());
      end
      if (!empty) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL dout %h exp %h", dout, model[0]); end
      end
      if (full) fulls++;
      push = !full && ($urandom_range(0, 2) != 0);
      pop  = !empty && ($urandom_range(0, 2) != 0);
      din  = 16'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    @(negedge clk); push = 0; pop = 0;
    while (!empty) begin
      @(negedge clk);
      checks++;
      if (dout !== model[0]) failures++;
      pop = 1;
      @(posedge clk);
      void'(model.pop_front());
      @(negedge clk); pop = 0;
    end
    checks++;
    if (model.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
