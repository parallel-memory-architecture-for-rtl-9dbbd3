// scheme_determination: finds s, the power of two in the scheme stride.
//
// Any stride can be written as sigma * 2**s with sigma odd; one skewing scheme per
// value of s makes every such stride conflict free. This unit gets Stride_s
// (str, d = STRIDE_W bits) and returns s, the number of zero bits below the lowest
// '1'. It follows the comparator structure of the architecture: comparator j tests
// str[j:0] == 0 for j = 0 .. d-2, and the d-1 one-bit results are summed. Because
// the low fields are nested, the sum is exactly the trailing zero count. The top
// bit str[d-1] is not needed since Stride_s is never zero; for str == 0 the unit
// returns d-1.
//
// Purely combinational.
module scheme_determination #(
  parameter int unsigned STRIDE_W = pm_pkg::STRIDE_W,
  localparam int unsigned S_W     = $clog2(STRIDE_W)
) (
  input  logic [STRIDE_W-1:0] str,
  output logic [S_W-1:0]      s
);
  logic [STRIDE_W-2:0] is_zero;

  for (genvar j = 0; j < STRIDE_W - 1; j++) begin : g_cmp
    assign is_zero[j] = (str[j:0] == '0);
  end

  always_comb begin
    s = '0;
    for (int unsigned j = 0; j < STRIDE_W - 1; j++) begin
      s = s + S_W'(is_zero[j]);
    end
  end
endmodule
