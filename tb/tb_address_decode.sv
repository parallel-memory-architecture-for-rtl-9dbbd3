// tb_address_decode: checks a(i) = floor(i / N) for the worked example (locations
// 4..7 are row 1, 12..15 row 3) and for random locations.
module tb_address_decode;
  localparam int unsigned N_LOG2 = pm_pkg::N_LOG2;
  localparam int unsigned LOC_W  = pm_pkg::LOC_W;
  localparam int unsigned N      = 2**N_LOG2;

  logic [N-1:0][LOC_W-1:0]        loc;
  logic [N-1:0][LOC_W-N_LOG2-1:0] addr;
  int checks = 0, failures = 0;

  address_decode #(.N_LOG2(N_LOG2), .LOC_W(LOC_W)) dut (.loc(loc), .addr(addr));

  task automatic check_all();
    #1;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned exp = int'(loc[k]) / N;
      checks++;
      if (addr[k] !== (LOC_W-N_LOG2)'(exp)) begin
        failures++;
        $display("FAIL i=%0d a=%0d exp %0d", loc[k], addr[k], exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'(4 + k);
    check_all();
    for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'(12 + k);
    check_all();
    for (int t = 0; t < 1000; t++) begin
      for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
