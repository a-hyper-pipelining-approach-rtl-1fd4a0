// Shared types and constants of the single-micro-pipeline hybrid multiplier.
//
// mem_style_e selects how the storage of every pipe is built:
//   MEM_SET_SEP  : single-edge-triggered, sum and carry in two separate flip-flops
//   MEM_SET_COMB : single-edge-triggered, sum and carry merged into one 2-bit register
//   MEM_DET_SEP  : double-edge-triggered, separate sum and carry elements
//   MEM_DET_COMB : double-edge-triggered, merged 2-bit element (the main configuration:
//                  register retiming into one combined memory per stage, clocked on both edges)
// In the double-edge styles one pipeline step happens on every clock edge, so an operation
// takes half as many clock periods as in the single-edge styles.
package hm_pkg;

  typedef enum logic [1:0] {
    MEM_SET_SEP  = 2'd0,
    MEM_SET_COMB = 2'd1,
    MEM_DET_SEP  = 2'd2,
    MEM_DET_COMB = 2'd3
  } mem_style_e;

  // Operand width of the multiplier (32-bit operands, 64-bit product).
  localparam int unsigned HM_WIDTH = 32;

  function automatic bit mem_is_det(mem_style_e m);
    return (m == MEM_DET_SEP) || (m == MEM_DET_COMB);
  endfunction

  function automatic bit mem_is_comb(mem_style_e m);
    return (m == MEM_SET_COMB) || (m == MEM_DET_COMB);
  endfunction

endpackage
