// pm_e2e_checker: the end-to-end test of tb_parallel_memory for a parallel_memory
// of any size. It instantiates the memory with the given parameters and runs, for
// every scheme s, row fills, back-to-back strided reads and writes (including
// wrap-around and write-then-read), row read-back under another stride with the same
// s, and mismatched requests that must raise conflict. Expected values come from a
// reference copy of the memory indexed by location and from the skewing equations
// evaluated here. It raises done when finished and reports its counts; a mechanism
// that never happened counts as a failure.
module pm_e2e_checker #(
  parameter int unsigned N_LOG2     = 2,
  parameter int unsigned DEPTH_LOG2 = 6,
  parameter int unsigned DATA_W     = 16
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned LOC_W      = N_LOG2 + DEPTH_LOG2;
  localparam int unsigned STRIDE_W   = LOC_W;
  localparam int unsigned N          = 2**N_LOG2;
  localparam int unsigned NLOC       = 2**LOC_W;
  localparam int unsigned MASK       = NLOC - 1;

  logic                     clk = 0;
  logic                     rst_n;
  logic                     we;
  logic [LOC_W-1:0]         r, stride_a;
  logic [STRIDE_W-1:0]      stride_s;
  logic [N-1:0][DATA_W-1:0] wd, rd;
  logic                     conflict;

  parallel_memory #(.N_LOG2(N_LOG2), .DEPTH_LOG2(DEPTH_LOG2), .DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .r(r), .stride_a(stride_a), .stride_s(stride_s),
    .wd(wd), .rd(rd), .conflict(conflict)
  );

  always #5 clk = ~clk;

  int cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_low_order = 0, n_xor_small = 0, n_xor_large = 0, n_scheme_change = 0;
  int n_stride_read = 0, n_stride_write = 0, n_row = 0, n_wrap = 0;
  int n_write_then_read = 0, n_conflict = 0;

  logic [DATA_W-1:0] ref_mem [NLOC];
  bit                ref_valid [NLOC];   // written under the current scheme

  // the read expected from the request of the previous cycle
  bit                       pend;
  bit   [N-1:0]             pend_valid;
  logic [N-1:0][DATA_W-1:0] pend_exp;
  bit                       last_was_write;


  function automatic int unsigned tz(input int unsigned v);
    int unsigned n = 0;
    if (v == 0) return STRIDE_W - 1;
    while (((v >> n) & 1) == 0) n++;
    return n;
  endfunction

  function automatic int unsigned skew(input int unsigned i, input int unsigned sv);
    if (sv == 0) return i % N;
    return ((i >> sv) % N) ^ (i % N);
  endfunction

  function automatic bit is_clean(input int unsigned rr, input int unsigned sa,
                                  input int unsigned ss);
    logic [N-1:0] seen = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned m = skew((rr + k * sa) & MASK, tz(ss));
      if (seen[m]) return 0;
      seen[m] = 1;
    end
    return 1;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL N=%0d cycle %0d: %s", N, cycles, msg);
  endtask

  // One request per clock. Called between clock edges: checks the read data of
  // the previous request, then presents the new one.
  task automatic request(input bit w, input int unsigned rr, input int unsigned sa,
                         input int unsigned ss);
    bit clean = is_clean(rr, sa, ss);
    @(negedge clk);
    if (!w && last_was_write) n_write_then_read++;
    last_was_write = w;
    we = w; r = LOC_W'(rr); stride_a = LOC_W'(sa); stride_s = STRIDE_W'(ss);
    if (rr + (N - 1) * sa > MASK) n_wrap++;
    #1;
    // rd belongs to the previous request and must not follow the new inputs
    if (pend) begin
      for (int unsigned k = 0; k < N; k++) begin
        if (!pend_valid[k]) continue;
        checks++;
        if (rd[k] !== pend_exp[k]) fail($sformatf("rd[%0d]=%h exp %h", k, rd[k], pend_exp[k]));
      end
    end
    checks++;
    if (conflict !== !clean) fail($sformatf("conflict=%0b for r=%0d sa=%0d ss=%0d", conflict, rr, sa, ss));
    if (conflict) n_conflict++;
    pend = clean;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i = (rr + k * sa) & MASK;
      pend_exp[k]   = ref_mem[i];               // old data, also during a write
      pend_valid[k] = ref_valid[i];
      if (w) begin
        wd[k] = DATA_W'($urandom);
        if (clean) begin
          ref_mem[i]   = wd[k];
          ref_valid[i] = 1'b1;
        end
      end
    end
  endtask

  function automatic int unsigned odd();
    return (($urandom % 64) * 2 + 1);
  endfunction

  initial begin
    int unsigned sv, ss, sa, prev_s;
    done = 0; checks = 0; failures = 0;
    rst_n = 0; we = 0; r = '0; stride_a = 1; stride_s = 1; wd = '0;
    pend = 0; last_was_write = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_s = 0;
    for (sv = 0; sv + N_LOG2 <= LOC_W; sv++) begin
      if (sv != prev_s) n_scheme_change++;
      // a new scheme invalidates what the modules hold
      for (int unsigned i = 0; i < NLOC; i++) ref_valid[i] = 1'b0;
      prev_s = sv;
      if (sv == 0) n_low_order++;
      else if (sv < N_LOG2) n_xor_small++;
      else n_xor_large++;
      ss = (odd() << sv) & MASK;
      // 1. fill with word-aligned row writes
      for (int unsigned w = 0; w < NLOC / N; w++) begin
        request(1, w * N, 1, ss);
        n_row++;
      end
      // 2. back-to-back strided reads
      for (int t = 0; t < 300; t++) begin
        sa = (odd() << sv) & MASK;
        request(0, $urandom & MASK, sa, ss);
        n_stride_read++;
      end
      // 3. strided writes mixed with reads
      for (int t = 0; t < 300; t++) begin
        bit w;
        w  = 1'($urandom % 2);
        sa = (odd() << sv) & MASK;
        request(w, $urandom & MASK, sa, ss);
        if (w) n_stride_write++; else n_stride_read++;
      end
      // 4. read back everything with row accesses, other stride of the same s
      ss = (odd() << sv) & MASK;
      for (int unsigned w = 0; w < NLOC / N; w++) begin
        request(0, w * N, 1, ss);
        n_row++;
      end
      // 5. mismatched reads: some of them conflict
      for (int t = 0; t < 100; t++) begin
        request(0, $urandom & MASK, $urandom & MASK, ss);
      end
    end
    request(0, 0, 1, 1);      // flush the last pending read
    pend = 0;
    request(0, 0, 1, 1);

    $display("N=%0d: low-order %0d, xor s<n %0d, xor s>=n %0d, scheme changes %0d",
             N, n_low_order, n_xor_small, n_xor_large, n_scheme_change);
    $display("strided reads %0d, strided writes %0d, row accesses %0d, wraps %0d",
             n_stride_read, n_stride_write, n_row, n_wrap);
    $display("write->read turnarounds %0d, conflicts flagged %0d, cycles %0d",
             n_write_then_read, n_conflict, cycles);
    checks++;
    if (n_low_order == 0 || n_scheme_change == 0 || n_stride_read == 0 ||
        n_stride_write == 0 || n_row == 0 || n_wrap == 0 || n_write_then_read == 0 ||
        n_conflict == 0 || (N_LOG2 > 1 && n_xor_small == 0) || n_xor_large == 0)
      fail("a mechanism was never exercised");
    done = 1;
  end
endmodule
