// Shared types for the Z-TCAM, an SRAM-based ternary CAM.
//
// The table is loaded through one write port that addresses a single word of
// one memory of one sub-word partition in one layer. mem_sel_e names which of
// the three per-partition memories that word belongs to:
//   MEM_VM    validation memory, 2^w x 1   (data bit 0)
//   MEM_OATAM OAT address memory, 2^w x w  (data bits w-1:0)
//   MEM_OAT   original address table, 2^w x K (data bits K-1:0)
// The encoding is this design's own choice; the architecture only says that
// the three memories are written while the table is mapped.
package ztcam_pkg;

  typedef enum logic [1:0] {
    MEM_VM    = 2'd0,
    MEM_OATAM = 2'd1,
    MEM_OAT   = 2'd2
  } mem_sel_e;

  // Width of a bus that must hold a value in 0..n-1 (at least one bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
