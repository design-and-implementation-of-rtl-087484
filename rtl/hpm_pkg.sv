// hpm_pkg -- geometry of the triangular HPM (high-performance multiplier)
// reduction tree, shared by the partial-product reducer and its testbenches.
//
// For an N x N multiply the partial-product bits fall into columns
// c = 0 .. 2N-2 (bit weight 2^c). The tree has N-1 rows of adder cells,
// numbered 1 (apex) to N-1 (bottom). Row r holds a half adder at column N-r
// and full adders at columns N-r+1 .. N-1+r, so the rows widen by one cell on
// each side going down and form a triangle whose apex sits over columns N-1
// and N. The first cell a column meets going down is its "top row". The
// functions below give the top row of a column, how many input bits the
// column takes from the partial-product generator, and the a-operand index
// of the first partial product that falls in it. Column N takes one bit more
// than it has partial products: the spare input that carries the
// Baugh-Wooley correction constant of weight 2^N.
package hpm_pkg;

  // Row of the first (highest) cell in column c; 0 for column 0, which has
  // no cell (its single partial product is product bit 0).
  function automatic int top_row(int n, int c);
    if (c == 0) return 0;
    if (c <= n - 1) return n - c;
    return c - n + 1;
  endfunction

  // Number of bits column c takes from outside the tree: its partial
  // products, plus the spare correction input in column n.
  function automatic int col_inputs(int n, int c);
    if (c <= n - 1) return c + 1;
    if (c == n) return n;
    return 2 * n - 1 - c;
  endfunction

  // Index i of a_i in the first partial product a_i*b_(c-i) of column c;
  // the k-th partial product of the column has a-index first_a + k.
  function automatic int first_a(int n, int c);
    return (c <= n - 1) ? 0 : c - n + 1;
  endfunction

endpackage
