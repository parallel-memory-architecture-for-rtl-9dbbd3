// tb_format_control: checks that format_control forms i_k = r + k*stride (mod 2**LOC_W)
// for the worked example (r = 1, stride 2: locations 1, 3, 5, 7), for a wrapping
// access and for random scanning points and strides. The expected locations are
// computed here with 32-bit arithmetic and masked to the location width.
module tb_format_control;
  localparam int unsigned N_LOG2 = pm_pkg::N_LOG2;
  localparam int unsigned LOC_W  = pm_pkg::LOC_W;
  localparam int unsigned N      = 2**N_LOG2;

  logic [LOC_W-1:0]        r, stride_a;
  logic [N-1:0][LOC_W-1:0] loc;
  int checks = 0, failures = 0;

  format_control #(.N_LOG2(N_LOG2), .LOC_W(LOC_W)) dut (.r(r), .stride_a(stride_a), .loc(loc));

  task automatic apply(input int unsigned rr, input int unsigned st);
    int unsigned mask = (1 << LOC_W) - 1;
    r = LOC_W'(rr); stride_a = LOC_W'(st);
    #1;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned exp = (rr + k * st) & mask;
      checks++;
      if (loc[k] !== LOC_W'(exp)) begin
        failures++;
        $display("FAIL r=%0d stride=%0d k=%0d got %0d exp %0d", rr, st, k, loc[k], exp);
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
    apply(1, 2);
    apply(0, 1);
    apply((1 << LOC_W) - 3, 5);         // wraps around the location space
    apply(7, (1 << LOC_W) - 1);         // stride of -1
    for (int t = 0; t < 2000; t++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
