// module_assignment: computes the memory module number S(i_k) of every accessed
// location under the skewing scheme selected by s.
//
// The scheme is the XOR scheme S(i) = i[n+s-1:s] XOR i[n-1:0] (n = N_LOG2). For
// s = 0 that would XOR the low bits with themselves, so odd strides use the
// low-order interleaved scheme S(i) = i[n-1:0] instead: a comparator on s = 0
// selects a zero operand in place of the shifted field. Each of the N identical
// slices is a right shifter, an equality comparator, a multiplexer and n XOR gates,
// as in the architecture. Bits of the shifted field above the location width read
// as zero.
//
// Purely combinational; mod_num[k] is S(i_k).
module module_assignment #(
  parameter int unsigned N_LOG2 = pm_pkg::N_LOG2,
  parameter int unsigned LOC_W  = pm_pkg::LOC_W,
  parameter int unsigned S_W    = $clog2(pm_pkg::STRIDE_W)
) (
  input  logic [2**N_LOG2-1:0][LOC_W-1:0]  loc,
  input  logic [S_W-1:0]                   s,
  output logic [2**N_LOG2-1:0][N_LOG2-1:0] mod_num
);
  localparam int unsigned N = 2**N_LOG2;

  for (genvar k = 0; k < N; k++) begin : g_slice
    logic              s_is_zero;
    logic [LOC_W-1:0]  shifted;
    logic [N_LOG2-1:0] field;
    assign s_is_zero  = (s == '0);
    assign shifted    = loc[k] >> s;
    assign field      = s_is_zero ? '0 : shifted[N_LOG2-1:0];
    assign mod_num[k] = field ^ loc[k][N_LOG2-1:0];
  end
endmodule
