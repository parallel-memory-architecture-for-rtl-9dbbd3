// pm_pkg: sizes shared by the parallel memory blocks.
//
// The memory system has N = 2**N_LOG2 memory modules, each 2**DEPTH_LOG2 words of
// DATA_W bits, so a data location i is LOC_W = N_LOG2 + DEPTH_LOG2 bits wide: its
// N_LOG2 low bits (after skewing) pick the module and the remaining bits are the
// address inside the module. The stride that selects the skewing scheme (Stride_s)
// is STRIDE_W bits wide. Four modules is the size of the worked example the design
// is built around; the module depth, data width and stride width are this design's
// own choices, as the architecture leaves them as design-time parameters.
package pm_pkg;
  localparam int unsigned N_LOG2     = 2;                    // N = 4 memory modules
  localparam int unsigned DEPTH_LOG2 = 10;                   // 1024 words per module
  localparam int unsigned DATA_W     = 16;                   // bits per data element
  localparam int unsigned LOC_W      = N_LOG2 + DEPTH_LOG2;  // l, width of a location
  localparam int unsigned STRIDE_W   = LOC_W;                // d, width of Stride_s
endpackage
