// Shared types of the approximate multipliers.
// mult8_comp_e selects which approximate 4:2 compressor fills the
// compressor positions of the 8x8 tree: the new FA/HA/OR compressor, or the
// modified dual-stage pair (inverting cell in stage 1, complement-input cell
// in stage 2). Both are four-input, two-output cells, so the tree's
// structure does not change with the choice.
package amul_pkg;
  typedef enum logic [0:0] {
    M8_NEW_COMP    = 1'b0,
    M8_DUAL_STAGE  = 1'b1
  } mult8_comp_e;
endpackage
