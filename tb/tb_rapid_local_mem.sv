// tb_rapid_local_mem: self-checking test of rapid_local_mem.
// Fills all 32 words sequentially using only the incrementing address path,
// reads them back sequentially after a clear, then mixes random address loads,
// increments, clears, writes and stalls against a reference model.
module tb_rapid_local_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;

  logic        addr_clr, addr_ld, addr_inc, we;
  logic [4:0]  addr_in, addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [32];
  logic [4:0]  maddr;

  rapid_local_mem u_dut (.clk, .rst_n, .en, .addr_clr, .addr_ld, .addr_in,
                         .addr_inc, .we, .wdata, .rdata, .addr);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    if (en) begin
      if (we) model[maddr] = wdata;
      if (addr_clr)      maddr = 0;
      else if (addr_ld)  maddr = addr_in;
      else if (addr_inc) maddr = maddr + 1;
    end
    @(posedge clk); #1;
  endtask

  task automatic check();
    checks++;
    if (addr !== maddr || rdata !== model[maddr]) begin
      failures++;
      $display("FAIL addr=%0d exp %0d rdata=%h exp %h", addr, maddr, rdata, model[maddr]);
    end
  endtask

  initial begin
    {addr_clr, addr_ld, addr_inc, we} = '0; addr_in = 0; wdata = 0; maddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // sequential fill
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; addr_inc = 1; wdata = 16'(i * 37 + 5);
      step();
    end
    @(negedge clk); we = 0; addr_inc = 0; addr_clr = 1; step();
    addr_clr = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      check();
      checks++;
      if (rdata !== 16'(i * 37 + 5)) failures++;
      addr_inc = 1;
      step();
    end
    // random mix
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      addr_clr = ($urandom_range(0, 15) == 0);
      addr_ld  = ($urandom_range(0, 3) == 0);
      addr_inc = $urandom_range(0, 1);
      we       = $urandom_range(0, 1);
      addr_in  = 5'($urandom);
      wdata    = 16'($urandom);
      en       = ($urandom_range(0, 7) != 0);
      step();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
