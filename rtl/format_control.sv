// format_control: forms the N data locations of one stride access.
//
// The access is given by its first element location (scanning point) r and its
// stride. Element k of the access is at i_k = r + k * stride: i_0 is r itself, i_1
// is one adder, and each further i_k multiplies the stride by the constant k and
// adds r, so the unit is N-1 adders and N-2 constant multipliers working in
// parallel. Locations wrap modulo 2**LOC_W (the width of the location bus); this
// wrap-around is a choice of this design.
//
// Purely combinational; loc[k] is i_k.
module format_control #(
  parameter int unsigned N_LOG2 = pm_pkg::N_LOG2,
  parameter int unsigned LOC_W  = pm_pkg::LOC_W
) (
  input  logic [LOC_W-1:0]                 r,
  input  logic [LOC_W-1:0]                 stride_a,
  output logic [2**N_LOG2-1:0][LOC_W-1:0]  loc
);
  localparam int unsigned N = 2**N_LOG2;

  assign loc[0] = r;
  assign loc[1] = r + stride_a;

  for (genvar k = 2; k < N; k++) begin : g_elem
    logic [LOC_W-1:0] scaled;
    assign scaled = stride_a * LOC_W'(k);   // constant multiplier
    assign loc[k] = r + scaled;
  end
endmodule
