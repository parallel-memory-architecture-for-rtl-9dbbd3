// tb_memory_module: writes random words to random addresses, keeping a copy in a
// testbench array, and reads them back. Checks the one-cycle read latency and the
// read-first behaviour when a word is read and written in the same cycle.
module tb_memory_module;
  localparam int unsigned DEPTH_LOG2 = pm_pkg::DEPTH_LOG2;
  localparam int unsigned W          = pm_pkg::DATA_W;

  logic                  clk = 0;
  logic                  we;
  logic [DEPTH_LOG2-1:0] addr;
  logic [W-1:0]          wd, rd;
  logic [W-1:0]          model [2**DEPTH_LOG2];
  int checks = 0, failures = 0;

  memory_module #(.DEPTH_LOG2(DEPTH_LOG2), .W(W)) dut (
    .clk(clk), .we(we), .addr(addr), .wd(wd), .rd(rd)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d rd=%h exp %h", what, addr, rd, exp);
    end
  endtask

  initial begin
    we = 0; addr = '0; wd = '0;
    // fill every word
    for (int unsigned a = 0; a < 2**DEPTH_LOG2; a++) begin
      @(negedge clk);
      we = 1; addr = DEPTH_LOG2'(a); wd = W'($urandom);
      model[a] = wd;
    end
    // random mix of reads and writes
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] exp;
      @(negedge clk);
      we   = ($urandom % 3) == 0;
      addr = DEPTH_LOG2'($urandom);
      wd   = W'($urandom);
      exp  = model[addr];          // read-first: old value even when writing
      if (we) model[addr] = wd;
      @(posedge clk); #1;
      check(exp, "read");
    end
    // latency: the value shows exactly one edge after the address
    @(negedge clk);
    we = 0; addr = 3;
    @(negedge clk);
    addr = 4;
    check(model[3], "latency");
    @(posedge clk); #1;
    check(model[4], "latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
