// tb_permutation_unit: drives random inputs and random (not necessarily bijective)
// selections into the crossbar and checks out[j] = in[ctrl[j]].
module tb_permutation_unit;
  localparam int unsigned N_LOG2 = pm_pkg::N_LOG2;
  localparam int unsigned W      = pm_pkg::DATA_W;
  localparam int unsigned N      = 2**N_LOG2;

  logic [N-1:0][W-1:0]      in, out;
  logic [N-1:0][N_LOG2-1:0] ctrl;
  int checks = 0, failures = 0;

  permutation_unit #(.N_LOG2(N_LOG2), .W(W)) dut (.in(in), .ctrl(ctrl), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] vals [N];
    int unsigned  sel  [N];
    for (int t = 0; t < 2000; t++) begin
      for (int unsigned k = 0; k < N; k++) begin
        vals[k] = W'($urandom);
        sel[k]  = $urandom % N;
        in[k]   = vals[k];
        ctrl[k] = N_LOG2'(sel[k]);
      end
      #1;
      for (int unsigned j = 0; j < N; j++) begin
        checks++;
        if (out[j] !== vals[sel[j]]) begin
          failures++;
          $display("FAIL out[%0d]=%h exp %h", j, out[j], vals[sel[j]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
