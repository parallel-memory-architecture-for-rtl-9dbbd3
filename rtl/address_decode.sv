// address_decode: the address inside a memory module of each accessed location.
//
// The skewing matrices only place extra ones in the low columns, so the row address
// is simply a(i) = floor(i / N): the LOC_W - n most significant bits of the
// location. The unit is wiring only, one field select per element.
//
// Purely combinational; addr[k] is a(i_k).
module address_decode #(
  parameter int unsigned N_LOG2 = pm_pkg::N_LOG2,
  parameter int unsigned LOC_W  = pm_pkg::LOC_W
) (
  input  logic [2**N_LOG2-1:0][LOC_W-1:0]        loc,
  output logic [2**N_LOG2-1:0][LOC_W-N_LOG2-1:0] addr
);
  for (genvar k = 0; k < 2**N_LOG2; k++) begin : g_elem
    assign addr[k] = loc[k][LOC_W-1:N_LOG2];
  end
endmodule
