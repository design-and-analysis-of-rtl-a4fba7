// Shared definitions for the approximate multiplier and the FIR filter.
//
// The partial-product columns of the multiplier are split by significance
// into three regions, and each region is reduced with its own kind of 5:2
// compressor:
//   CMP_OR     lowest columns,  OR-tree based approximate compressor
//   CMP_APPROX middle columns,  two-stage approximate compressor
//   CMP_EXACT  highest columns, exact compressor with carry chain
// The three-way split follows the design; where the borders lie is a
// parameter of the multiplier (the design leaves it to the implementer).
package approx_pkg;

  typedef enum logic [1:0] {
    CMP_OR     = 2'd0,
    CMP_APPROX = 2'd1,
    CMP_EXACT  = 2'd2
  } cmp_mode_e;

  // Region of column c, given the number of OR-tree columns (low_cols)
  // and of two-stage approximate columns above them (mid_cols).
  function automatic cmp_mode_e col_mode(int c, int low_cols, int mid_cols);
    if (c < low_cols)                 return CMP_OR;
    else if (c < low_cols + mid_cols) return CMP_APPROX;
    else                              return CMP_EXACT;
  endfunction

endpackage
