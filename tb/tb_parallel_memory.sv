// tb_parallel_memory: end-to-end test of the parallel memory at its default size.
//
// The testbench keeps a reference copy of the memory indexed by data location and
// computes every expected value itself: element k of a request is location
// r + k*stride_a, and the access is conflict free when the skewed module numbers
// (worked out here from the skewing equations) are all different. For every
// skewing scheme s = 0 .. LOC_W-n it
//   1. selects the scheme with a scheme stride sigma*2**s and fills the whole memory
//      with word-aligned row writes (stride_a = 1),
//   2. issues back-to-back random reads at strides sigma'*2**s from random scanning
//      points (wrapping around the end of the location space) and checks every
//      element one cycle later,
//   3. issues random writes at such strides, mixed with reads, checking the
//      read-first data returned during a write,
//   4. reads everything back with row accesses under a different scheme stride of
//      the same s, and
//   5. presents random mismatched requests and checks the conflict output.
// A request is issued every clock, so the checks also cover the one-access-per-
// clock rate and the one-cycle read latency. Each mechanism (low-order scheme,
// XOR scheme below and above s = n, scheme change, strided read, strided write,
// row access, wrap-around, write followed directly by a read, conflict detection)
// is counted, and one that never happened counts as a failure.
module tb_parallel_memory;
  localparam int unsigned N_LOG2     = pm_pkg::N_LOG2;
  localparam int unsigned DEPTH_LOG2 = pm_pkg::DEPTH_LOG2;
  localparam int unsigned DATA_W     = pm_pkg::DATA_W;
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

  parallel_memory dut (
    .clk(clk), .rst_n(rst_n), .we(we), .r(r), .stride_a(stride_a), .stride_s(stride_s),
    .wd(wd), .rd(rd), .conflict(conflict)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    if (failures < 20) $display("FAIL cycle %0d: %s", cycles, msg);
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

    $display("low-order %0d, xor s<n %0d, xor s>=n %0d, scheme changes %0d",
             n_low_order, n_xor_small, n_xor_large, n_scheme_change);
    $display("strided reads %0d, strided writes %0d, row accesses %0d, wraps %0d",
             n_stride_read, n_stride_write, n_row, n_wrap);
    $display("write->read turnarounds %0d, conflicts flagged %0d, cycles %0d",
             n_write_then_read, n_conflict, cycles);
    checks++;
    if (n_low_order == 0 || n_scheme_change == 0 || n_stride_read == 0 ||
        n_stride_write == 0 || n_row == 0 || n_wrap == 0 || n_write_then_read == 0 ||
        n_conflict == 0 || (N_LOG2 > 1 && n_xor_small == 0) || n_xor_large == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
