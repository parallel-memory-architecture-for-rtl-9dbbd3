// stride_sweep_checker: drives one address_computation of N = 2**N_LOG2 modules
// with accesses whose stride matches the scheme, sigma * 2**s for every s from 0
// to LOC_W - n, and checks that none of them conflicts and that every element's
// address reaches the module computed here from the skewing equations. For small
// configurations it walks every scanning point modulo 2**(n+s) (the module number
// depends on no higher bit) and every odd sigma below 2**(n+1); larger ones use
// random samples. It raises done when finished and reports its counts.
module stride_sweep_checker #(
  parameter int unsigned N_LOG2    = 2,
  parameter int unsigned DEPTH_LOG2 = 6,
  parameter int unsigned SAMPLES   = 400
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned N        = 2**N_LOG2;
  localparam int unsigned LOC_W    = N_LOG2 + DEPTH_LOG2;
  localparam int unsigned STRIDE_W = LOC_W;
  localparam int unsigned A_W      = DEPTH_LOG2;
  localparam int unsigned MASK     = (1 << LOC_W) - 1;

  logic [LOC_W-1:0]         r, stride_a;
  logic [STRIDE_W-1:0]      stride_s;
  logic [N-1:0][A_W-1:0]    addrs;
  logic [N-1:0][N_LOG2-1:0] r_control, w_control;
  logic                     conflict;

  address_computation #(.N_LOG2(N_LOG2), .LOC_W(LOC_W), .STRIDE_W(STRIDE_W)) dut (
    .r(r), .stride_a(stride_a), .stride_s(stride_s),
    .addrs(addrs), .r_control(r_control), .w_control(w_control), .conflict(conflict)
  );

  task automatic apply(input int unsigned rr, input int unsigned sa, input int unsigned ss,
                       input int unsigned sv);
    r = LOC_W'(rr); stride_a = LOC_W'(sa); stride_s = STRIDE_W'(ss);
    #1;
    checks++;
    if (conflict) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d s=%0d r=%0d stride=%0d conflicts", N, sv, rr, sa);
      return;
    end
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i = (rr + k * sa) & MASK;
      int unsigned m = (sv == 0) ? i % N : ((i >> sv) % N) ^ (i % N);
      checks++;
      if (r_control[k] !== N_LOG2'(m) || addrs[m] !== A_W'(i >> N_LOG2) ||
          w_control[m] !== N_LOG2'(k)) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d s=%0d r=%0d stride=%0d element %0d", N, sv, rr, sa, k);
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int unsigned sv = 0; sv + N_LOG2 <= LOC_W; sv++) begin
      int unsigned span, ss;
      span = 1 << (N_LOG2 + sv);
      ss   = 1 << sv;
      if (span * (N + 1) <= 4096) begin
        for (int unsigned rr = 0; rr < span; rr++)
          for (int unsigned sg = 1; sg < 2 * N; sg += 2)
            apply(rr, (sg << sv) & MASK, ss, sv);
      end else begin
        for (int t = 0; t < SAMPLES; t++) begin
          int unsigned sg;
          sg = ($urandom % 1024) * 2 + 1;
          apply($urandom & MASK, (sg << sv) & MASK, ((($urandom % 64) * 2 + 1) << sv) & MASK, sv);
        end
      end
    end
    done = 1;
  end
endmodule
