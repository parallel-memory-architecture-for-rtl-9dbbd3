// parallel_memory: a parallel memory of N = 2**N_LOG2 modules that reads or writes
// N data elements at any constant stride, from any start location, without module
// conflicts.
//
// Data location i is stored in module S(i) at address a(i) = i >> n, where the
// module assignment is an XOR skewing scheme picked at run time from the scheme
// stride stride_s = sigma * 2**s (sigma odd): S(i) = i[n+s-1:s] XOR i[n-1:0] for
// s > 0, and S(i) = i[n-1:0] for odd strides. With the scheme matching the access
// stride, the N elements r, r + stride_a, ..., r + (N-1)*stride_a always sit in N
// different modules. Changing stride_s changes the mapping, so data written under
// one scheme must be read under the same scheme; word-aligned row accesses
// (stride_a = 1, r a multiple of N) are conflict free under every scheme.
//
// Structure: the address computation unit produces the module addresses and the
// steering; a write data permutation crossbar routes wd[k] to module S(i_k); the
// modules are written together when we is high; a read data permutation crossbar
// routes module S(i_k)'s output back to rd[k].
//
// Timing (own choice; the architecture fixes none): one access per clock. A write
// is taken on the rising edge with we high. A read presented in cycle t (we low)
// returns rd[k] = data at i_k in cycle t+1; the read steering is registered so it
// lines up with the modules' one-cycle read latency. rst_n (asynchronous, active
// low) only clears that register. conflict is combinational for the request being
// presented and is an own addition; assertions check that no write conflicts and
// that stride_s is never zero. Verilator notes rst_n as used both asynchronously
// (the register) and synchronously (the assertions' disable condition); that is
// intended and has no effect on the logic.
module parallel_memory #(
  parameter int unsigned N_LOG2     = pm_pkg::N_LOG2,
  parameter int unsigned DEPTH_LOG2 = pm_pkg::DEPTH_LOG2,
  parameter int unsigned DATA_W     = pm_pkg::DATA_W,
  parameter int unsigned STRIDE_W   = N_LOG2 + DEPTH_LOG2,
  localparam int unsigned N         = 2**N_LOG2,
  localparam int unsigned LOC_W     = N_LOG2 + DEPTH_LOG2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [LOC_W-1:0]         r,
  input  logic [LOC_W-1:0]         stride_a,
  input  logic [STRIDE_W-1:0]      stride_s,
  input  logic [N-1:0][DATA_W-1:0] wd,
  output logic [N-1:0][DATA_W-1:0] rd,
  output logic                     conflict
);
  logic [N-1:0][DEPTH_LOG2-1:0] addrs;
  logic [N-1:0][N_LOG2-1:0]     r_control, r_control_q, w_control;
  logic [N-1:0][DATA_W-1:0]     mem_wd, mem_rd;

  address_computation #(
    .N_LOG2(N_LOG2), .LOC_W(LOC_W), .STRIDE_W(STRIDE_W)
  ) u_address_computation (
    .r(r), .stride_a(stride_a), .stride_s(stride_s),
    .addrs(addrs), .r_control(r_control), .w_control(w_control),
    .conflict(conflict)
  );

  permutation_unit #(.N_LOG2(N_LOG2), .W(DATA_W)) u_write_data_permutation (
    .in(wd), .ctrl(w_control), .out(mem_wd)
  );

  for (genvar j = 0; j < N; j++) begin : g_module
    memory_module #(.DEPTH_LOG2(DEPTH_LOG2), .W(DATA_W)) u_module (
      .clk(clk), .we(we), .addr(addrs[j]), .wd(mem_wd[j]), .rd(mem_rd[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_control_q <= '0;
    else        r_control_q <= r_control;
  end

  permutation_unit #(.N_LOG2(N_LOG2), .W(DATA_W)) u_read_data_permutation (
    .in(mem_rd), .ctrl(r_control_q), .out(rd)
  );

  // Usage rules: a write must be conflict free (otherwise it corrupts locations
  // outside the request), and the scheme stride is never zero.
  a_write_conflict_free : assert property (@(posedge clk) disable iff (!rst_n) we |-> !conflict)
    else $error("parallel_memory: conflicting write (r=%0d stride_a=%0d stride_s=%0d)",
                r, stride_a, stride_s);
  a_scheme_stride_nonzero : assert property (@(posedge clk) disable iff (!rst_n) stride_s != '0)
    else $error("parallel_memory: stride_s is zero");
endmodule
