// permutation_unit: an N x N full crossbar.
//
// Output j takes input ctrl[j]: out[j] = in[ctrl[j]]. Each output is one N-input
// multiplexer. The parallel memory uses three of these: the address permutation
// and the write data permutation are steered by the reordered module numbers S',
// the read data permutation by the module numbers S. W is the bus width (an
// address or a data element).
//
// Purely combinational.
module permutation_unit #(
  parameter int unsigned N_LOG2 = pm_pkg::N_LOG2,
  parameter int unsigned W      = pm_pkg::DATA_W
) (
  input  logic [2**N_LOG2-1:0][W-1:0]      in,
  input  logic [2**N_LOG2-1:0][N_LOG2-1:0] ctrl,
  output logic [2**N_LOG2-1:0][W-1:0]      out
);
  for (genvar j = 0; j < 2**N_LOG2; j++) begin : g_out
    assign out[j] = in[ctrl[j]];
  end
endmodule
