// address_computation: turns an access request into per-module addresses and the
// steering for the two data permutations.
//
// Inputs are the scanning point r, the access stride stride_a and the scheme stride
// stride_s. Format control forms the N locations i_k; scheme determination derives
// s from stride_s; module assignment computes S(i_k); address decode computes
// a(i_k); permutation control inverts S into S'; and the address permutation
// crossbar sends a(i_{S'(j)}) to memory module j. The access and scheme strides are
// separate inputs so that, for example, word-aligned row accesses (stride_a = 1)
// can be made into data stored under another scheme.
//
// Outputs: addrs[j] is the address for memory module j; r_control[k] = S(i_k)
// steers the read data permutation; w_control[j] = S'(i_j) steers the write data
// permutation. conflict (own addition) flags an access in which two elements fall
// into the same module. Purely combinational.
module address_computation #(
  parameter int unsigned N_LOG2   = pm_pkg::N_LOG2,
  parameter int unsigned LOC_W    = pm_pkg::LOC_W,
  parameter int unsigned STRIDE_W = pm_pkg::STRIDE_W,
  localparam int unsigned N       = 2**N_LOG2,
  localparam int unsigned A_W     = LOC_W - N_LOG2
) (
  input  logic [LOC_W-1:0]             r,
  input  logic [LOC_W-1:0]             stride_a,
  input  logic [STRIDE_W-1:0]          stride_s,
  output logic [N-1:0][A_W-1:0]        addrs,
  output logic [N-1:0][N_LOG2-1:0]     r_control,
  output logic [N-1:0][N_LOG2-1:0]     w_control,
  output logic                         conflict
);
  localparam int unsigned S_W = $clog2(STRIDE_W);

  logic [N-1:0][LOC_W-1:0]  loc;
  logic [S_W-1:0]           s;
  logic [N-1:0][N_LOG2-1:0] mod_num;
  logic [N-1:0][A_W-1:0]    elem_addr;
  logic [N-1:0][N_LOG2-1:0] perm;

  format_control #(.N_LOG2(N_LOG2), .LOC_W(LOC_W)) u_format_control (
    .r(r), .stride_a(stride_a), .loc(loc)
  );

  scheme_determination #(.STRIDE_W(STRIDE_W)) u_scheme_determination (
    .str(stride_s), .s(s)
  );

  module_assignment #(.N_LOG2(N_LOG2), .LOC_W(LOC_W), .S_W(S_W)) u_module_assignment (
    .loc(loc), .s(s), .mod_num(mod_num)
  );

  address_decode #(.N_LOG2(N_LOG2), .LOC_W(LOC_W)) u_address_decode (
    .loc(loc), .addr(elem_addr)
  );

  permutation_control #(.N_LOG2(N_LOG2)) u_permutation_control (
    .mod_num(mod_num), .perm(perm), .conflict(conflict)
  );

  permutation_unit #(.N_LOG2(N_LOG2), .W(A_W)) u_address_permutation (
    .in(elem_addr), .ctrl(perm), .out(addrs)
  );

  assign r_control = mod_num;
  assign w_control = perm;
endmodule
