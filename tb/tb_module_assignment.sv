// tb_module_assignment: checks the module numbers S(i) of module_assignment.
// 1) The worked table for n = 2, s = 1, locations 0..15:
//    S = 0 1 3 2 2 3 1 0 0 1 3 2 2 3 1 0.
// 2) s = 0 gives the low-order interleaved scheme S(i) = i mod N.
// 3) Random locations for every s against S(i) = ((i >> s) mod N) xor (i mod N).
// 4) The conflict free property: for every s from 0 to LOC_W-n and random odd
//    sigma and scanning points, the N locations r + k*sigma*2**s get N different
//    module numbers.
module tb_module_assignment;
  localparam int unsigned N_LOG2 = pm_pkg::N_LOG2;
  localparam int unsigned LOC_W  = pm_pkg::LOC_W;
  localparam int unsigned S_W    = $clog2(pm_pkg::STRIDE_W);
  localparam int unsigned N      = 2**N_LOG2;
  localparam int unsigned MASK   = (1 << LOC_W) - 1;

  logic [N-1:0][LOC_W-1:0]  loc;
  logic [S_W-1:0]           s;
  logic [N-1:0][N_LOG2-1:0] mod_num;
  int checks = 0, failures = 0;

  module_assignment #(.N_LOG2(N_LOG2), .LOC_W(LOC_W), .S_W(S_W)) dut (
    .loc(loc), .s(s), .mod_num(mod_num)
  );

  function automatic int unsigned ref_s(input int unsigned i, input int unsigned sv);
    if (sv == 0) return i % N;
    return ((i >> sv) % N) ^ (i % N);
  endfunction

  task automatic check(input int unsigned k, input int unsigned exp);
    checks++;
    if (mod_num[k] !== N_LOG2'(exp)) begin
      failures++;
      if (failures < 20) $display("FAIL s=%0d i=%0d got %0d exp %0d", s, loc[k], mod_num[k], exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int unsigned table1 [16] = '{0,1,3,2,2,3,1,0,0,1,3,2,2,3,1,0};
    // 1) worked table
    s = 1;
    for (int unsigned base = 0; base < 16; base += N) begin
      for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'(base + k);
      #1;
      if (N == 4) for (int unsigned k = 0; k < N; k++) check(k, table1[base + k]);
    end
    // 2) odd strides: low-order interleaving
    s = 0;
    for (int t = 0; t < 200; t++) begin
      for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'($urandom);
      #1;
      for (int unsigned k = 0; k < N; k++) check(k, int'(loc[k]) % N);
    end
    // 3) random locations, every scheme
    for (int unsigned sv = 0; sv < LOC_W; sv++) begin
      s = S_W'(sv);
      for (int t = 0; t < 100; t++) begin
        for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'($urandom);
        #1;
        for (int unsigned k = 0; k < N; k++) check(k, ref_s(int'(loc[k]), sv));
      end
    end
    // 4) conflict free strides sigma * 2**s
    for (int unsigned sv = 0; sv + N_LOG2 <= LOC_W; sv++) begin
      s = S_W'(sv);
      for (int t = 0; t < 200; t++) begin
        int unsigned r0, st;
        logic [N-1:0] seen;
        r0 = $urandom & MASK;
        st = ((($urandom % 64) * 2 + 1) << sv) & MASK;
        for (int unsigned k = 0; k < N; k++) loc[k] = LOC_W'((r0 + k * st) & MASK);
        #1;
        seen = '0;
        for (int unsigned k = 0; k < N; k++) seen[mod_num[k]] = 1'b1;
        checks++;
        if (seen !== '1) begin
          failures++;
          if (failures < 20) $display("FAIL conflict s=%0d r=%0d stride=%0d", sv, r0, st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
