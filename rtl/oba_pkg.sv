// oba_pkg: shared types and the cell-placement rule of the optimized bypassing
// architecture (OBA) multiplier.
//
// The array of an N x N OBA multiplier has rows i = 1..N-1 (row i is enabled by
// multiplier bit x[i]) and columns j = 0..N-2 (column j is enabled by y[j]).
// Two cell types are mixed in it:
//   - TDBA, the two-dimensional bypassing adder, sits where a column-bypassed
//     cell can never receive a carry it would have to add: the first two rows,
//     the first column (j = 0, whose dropped carry is recovered by the edge
//     chain) and the last column (j = N-2).
//   - MRBA, the modified row-bypassing adder, fills the rest of the array.
// The placement follows the document's overall structure; its extension to an
// N other than 8 is this design's own generalisation of the same rule.
package oba_pkg;

  typedef enum logic {
    CELL_TDBA = 1'b0,
    CELL_MRBA = 1'b1
  } cell_kind_e;

  // Kind of the adder cell in row i, column j of an n x n array.
  function automatic cell_kind_e cell_kind(input int i, input int j, input int n);
    if (i <= 2 || j == 0 || j == n - 2) return CELL_TDBA;
    return CELL_MRBA;
  endfunction

endpackage
