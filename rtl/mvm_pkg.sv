// Shared constants for the MUX/Vedic matrix-vector multiplier.
//
// DATA_W is the element width of the matrix and the vector (8-bit pixels and
// filter coefficients). MAT_ROWS x MAT_COLS is the size of the matrix that is
// multiplied by a MAT_COLS x 1 vector: 1028 x 28 is the configuration this
// design is sized for. ACC_W is wide enough that a sum of MAT_COLS products of
// two DATA_W-bit unsigned numbers never overflows.
package mvm_pkg;
  localparam int unsigned DATA_W   = 8;
  localparam int unsigned MAT_ROWS = 1028;
  localparam int unsigned MAT_COLS = 28;

  // Width of an unsigned sum of n products, each 2*dw bits wide.
  function automatic int unsigned acc_width(int unsigned dw, int unsigned n);
    return 2 * dw + $clog2(n);
  endfunction
endpackage
