// hpm_bw_mult -- N x N Baugh-Wooley multiplier with a triangular HPM
// reduction tree (top level; N = 8 by default, N = 4 is the small variant).
//
// Multiplies a by b as unsigned numbers (tc = 0) or as two's-complement
// numbers (tc = 1) and returns the full 2N-bit product p. bw_ppg forms the
// N*N partial-product bits in Baugh-Wooley form (sign-related bits
// complemented, correction ones added) so that all of them are positive, and
// hpm_tree adds them with a triangle of half and full adders whose bottom
// row delivers the product. Purely combinational: no clock, p settles one
// gate-path delay after a, b or tc change.
//
// The structure (Baugh-Wooley partial products, HPM triangle, 8-bit default)
// is the paper's; the tc mode input is this design's own way of offering
// both signed and unsigned multiplication.
module hpm_bw_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           tc,
  output logic [2*N-1:0] p
);
  logic [N-1:0][N-1:0] pp;
  logic                k_mid, k_msb;

  bw_ppg  #(.N(N)) u_ppg  (.a, .b, .tc, .pp, .k_mid, .k_msb);
  hpm_tree #(.N(N)) u_tree (.pp, .k_mid, .k_msb, .p);
endmodule
