// tb_address_computation: checks the whole address path against a reference
// computed here from the skewing equations. For each request the testbench works
// out i_k = r + k*stride_a, s = trailing zeros of stride_s, S(i_k) and a(i_k), and
// checks r_control[k] = S(i_k), and, when the S(i_k) are all different, that module
// S(i_k) receives address a(i_k) and w_control[S(i_k)] = k, with conflict low;
// otherwise conflict must be high. Requests are the worked example (r = 1,
// stride 2), matched strides sigma*2**s for every s, word-aligned row accesses
// under other schemes, and random (often conflicting) requests.
module tb_address_computation;
  localparam int unsigned N_LOG2   = pm_pkg::N_LOG2;
  localparam int unsigned LOC_W    = pm_pkg::LOC_W;
  localparam int unsigned STRIDE_W = pm_pkg::STRIDE_W;
  localparam int unsigned N        = 2**N_LOG2;
  localparam int unsigned A_W      = LOC_W - N_LOG2;
  localparam int unsigned MASK     = (1 << LOC_W) - 1;

  logic [LOC_W-1:0]         r, stride_a;
  logic [STRIDE_W-1:0]      stride_s;
  logic [N-1:0][A_W-1:0]    addrs;
  logic [N-1:0][N_LOG2-1:0] r_control, w_control;
  logic                     conflict;
  int checks = 0, failures = 0;
  int n_conflict = 0, n_clean = 0;

  address_computation #(.N_LOG2(N_LOG2), .LOC_W(LOC_W), .STRIDE_W(STRIDE_W)) dut (
    .r(r), .stride_a(stride_a), .stride_s(stride_s),
    .addrs(addrs), .r_control(r_control), .w_control(w_control), .conflict(conflict)
  );

  function automatic int unsigned tz(input int unsigned v);
    int unsigned n = 0;
    if (v == 0) return STRIDE_W - 1;
    while (((v >> n) & 1) == 0) n++;
    return n;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL r=%0d sa=%0d ss=%0d: %s", r, stride_a, stride_s, msg);
  endtask

  task automatic apply(input int unsigned rr, input int unsigned sa, input int unsigned ss,
                       input bit must_be_clean);
    int unsigned  sv = tz(ss);
    int unsigned  i  [N];
    int unsigned  m  [N];
    logic [N-1:0] seen = '0;
    bit           clean = 1;
    r = LOC_W'(rr); stride_a = LOC_W'(sa); stride_s = STRIDE_W'(ss);
    #1;
    for (int unsigned k = 0; k < N; k++) begin
      i[k] = (rr + k * sa) & MASK;
      m[k] = (sv == 0) ? i[k] % N : ((i[k] >> sv) % N) ^ (i[k] % N);
      if (seen[m[k]]) clean = 0;
      seen[m[k]] = 1;
      checks++;
      if (r_control[k] !== N_LOG2'(m[k])) fail("module number");
    end
    checks++;
    if (conflict !== !clean) fail("conflict flag");
    if (must_be_clean) begin
      checks++;
      if (!clean) fail("expected conflict free access");
    end
    if (clean) begin
      n_clean++;
      for (int unsigned k = 0; k < N; k++) begin
        checks += 2;
        if (addrs[m[k]] !== A_W'(i[k] / N)) fail("module address");
        if (w_control[m[k]] !== N_LOG2'(k)) fail("write steering");
      end
    end else n_conflict++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1, 2, 2, 1);                                  // worked example
    if (N == 4) begin
      checks++;
      // locations 1,3,5,7 live in modules 1,2,3,0 at rows 0,0,1,1, so modules
      // 3,2,1,0 get rows 1,0,0,1
      if (addrs !== {A_W'(1), A_W'(0), A_W'(0), A_W'(1)} ||
          r_control !== {2'd0, 2'd3, 2'd2, 2'd1}) fail("worked example");
      apply(9, 1, 2, 0);                                // 9..12: conflict (11 and 12)
      checks++;
      if (!conflict) fail("unaligned row access should conflict");
    end
    for (int unsigned sv = 0; sv + N_LOG2 <= LOC_W; sv++)
      for (int t = 0; t < 200; t++) begin
        int unsigned sigma, sigma2;
        sigma  = ($urandom % 128) * 2 + 1;
        sigma2 = ($urandom % 128) * 2 + 1;
        apply($urandom & MASK, (sigma << sv) & MASK, (sigma2 << sv) & MASK, 1);
      end
    for (int unsigned sv = 0; sv < STRIDE_W; sv++)      // row accesses, any scheme
      for (int t = 0; t < 50; t++)
        apply(($urandom & MASK) & ~(N - 1), 1, (($urandom % 64) * 2 + 1) << sv, 1);
    for (int t = 0; t < 2000; t++)
      apply($urandom & MASK, $urandom & MASK, ($urandom & ((1 << STRIDE_W) - 1)) | 1 << ($urandom % STRIDE_W), 0);
    checks++;
    if (n_conflict == 0 || n_clean == 0) fail("coverage");
    $display("clean accesses %0d, conflicting accesses %0d", n_clean, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
