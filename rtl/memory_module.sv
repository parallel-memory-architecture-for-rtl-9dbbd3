// memory_module: one of the N single-port memory modules S_0 .. S_{N-1}.
//
// 2**DEPTH_LOG2 words of W bits. A write happens on the rising clock edge when we
// is high. The module reads every cycle: rd holds, one clock after addr is
// presented, the word stored at that address before the edge (read-first on a
// simultaneous write). The architecture does not fix the memory timing; a
// synchronous single-port RAM with one cycle of read latency is this design's
// choice, as it maps onto ordinary SRAM macros and FPGA block RAM. The array has no
// reset, like such a RAM.
module memory_module #(
  parameter int unsigned DEPTH_LOG2 = pm_pkg::DEPTH_LOG2,
  parameter int unsigned W          = pm_pkg::DATA_W
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [DEPTH_LOG2-1:0] addr,
  input  logic [W-1:0]          wd,
  output logic [W-1:0]          rd
);
  logic [W-1:0] mem [2**DEPTH_LOG2];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wd;
    rd <= mem[addr];
  end
endmodule
