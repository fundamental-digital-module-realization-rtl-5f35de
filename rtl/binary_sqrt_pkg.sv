// binary_sqrt_pkg: sizing rules shared by the square-root array and its
// testbenches.
//
// For a SIZE-bit radicand the root has HALF = SIZE/2 bits and the array has
// HALF rows, row k (k = 0 is the top row, fed by the two most significant
// radicand bits) producing root bit HALF-1-k.
//   row_width(k)  = min(2k+2, HALF+2)   subtractor cells in row k
//   rem_width(k)  = min(2k+2, HALF)     remainder bits row k hands to row k+1
// For SIZE = 8 this gives rows of 2, 4, 6 and 6 cells and remainders of 2, 4
// and 4 bits. The remainder after row k is at most twice the partial root, so
// it always fits in k+2 <= HALF bits and no information is dropped.
package binary_sqrt_pkg;

  function automatic int unsigned row_width(int unsigned k, int unsigned half);
    return (2*k + 2 < half + 2) ? 2*k + 2 : half + 2;
  endfunction

  function automatic int unsigned rem_width(int unsigned k, int unsigned half);
    return (2*k + 2 < half) ? 2*k + 2 : half;
  endfunction

endpackage
