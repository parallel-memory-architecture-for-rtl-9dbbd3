// permutation_control: inverts the module-number permutation of an access.
//
// Input mod_num[b] = S(i_b) says which memory module holds element b. Output
// perm[k] = S'(i_k) is the element index b whose module number equals k, i.e. which
// element module k must serve. Slice k compares every S(i_b) with the constant k and
// the one-hot comparator result selects the constant b (an AND-OR multiplexer of
// constants). Example with N = 4: S = {1,2,3,0} gives S' = {3,0,1,2}.
//
// The architecture only defines the result for conflict free accesses. As an own
// addition, conflict is set when some module number k is matched by no element
// (so another module is the target of two); perm[k] is then the OR of all matching
// indices and should not be used.
//
// Purely combinational.
module permutation_control #(
  parameter int unsigned N_LOG2 = pm_pkg::N_LOG2
) (
  input  logic [2**N_LOG2-1:0][N_LOG2-1:0] mod_num,
  output logic [2**N_LOG2-1:0][N_LOG2-1:0] perm,
  output logic                             conflict
);
  localparam int unsigned N = 2**N_LOG2;

  logic [N-1:0] hit;

  // Slice k: N equality comparators against the constant k; the one-hot result
  // selects the constant index b.
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      perm[k] = '0;
      hit[k]  = 1'b0;
      for (int unsigned b = 0; b < N; b++) begin
        if (mod_num[b] == N_LOG2'(k)) begin
          perm[k] |= N_LOG2'(b);
          hit[k]   = 1'b1;
        end
      end
    end
  end

  assign conflict = ~&hit;
endmodule
