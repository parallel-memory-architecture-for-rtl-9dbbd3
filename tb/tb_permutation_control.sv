// tb_permutation_control: checks that perm is the inverse of the module-number
// permutation: the worked example {1,2,3,0} -> {3,0,1,2}, then random permutations
// (shuffled here), for which mod_num[perm[k]] must equal k and conflict must stay
// low, and random non-permutations, for which conflict must be set.
module tb_permutation_control;
  localparam int unsigned N_LOG2 = pm_pkg::N_LOG2;
  localparam int unsigned N      = 2**N_LOG2;

  logic [N-1:0][N_LOG2-1:0] mod_num, perm;
  logic                     conflict;
  int checks = 0, failures = 0;

  permutation_control #(.N_LOG2(N_LOG2)) dut (
    .mod_num(mod_num), .perm(perm), .conflict(conflict)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p [N];
    if (N == 4) begin
      mod_num = {2'd0, 2'd3, 2'd2, 2'd1};    // S(i_0..3) = 1, 2, 3, 0
      #1;
      checks++;
      if (perm !== {2'd2, 2'd1, 2'd0, 2'd3} || conflict) begin
        failures++;
        $display("FAIL example perm=%h conflict=%0b", perm, conflict);
      end
    end
    for (int t = 0; t < 1000; t++) begin
      for (int unsigned k = 0; k < N; k++) p[k] = k;
      for (int unsigned k = N - 1; k > 0; k--) begin
        int unsigned j, tmp;
        j = $urandom % (k + 1);
        tmp = p[k];
        p[k] = p[j]; p[j] = tmp;
      end
      for (int unsigned b = 0; b < N; b++) mod_num[b] = N_LOG2'(p[b]);
      #1;
      for (int unsigned k = 0; k < N; k++) begin
        checks++;
        if (p[perm[k]] != k) begin
          failures++;
          $display("FAIL perm[%0d]=%0d maps to %0d", k, perm[k], p[perm[k]]);
        end
      end
      checks++;
      if (conflict) begin failures++; $display("FAIL spurious conflict"); end
    end
    for (int t = 0; t < 200; t++) begin
      int unsigned j, b;
      j = $urandom % N;
      b = (j + 1 + $urandom % (N - 1)) % N;
      for (int unsigned k = 0; k < N; k++) mod_num[k] = N_LOG2'(k);
      mod_num[b] = mod_num[j];               // two elements in one module
      #1;
      checks++;
      if (!conflict) begin failures++; $display("FAIL conflict not flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
