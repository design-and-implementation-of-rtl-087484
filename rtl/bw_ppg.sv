// bw_ppg -- Baugh-Wooley partial-product generator.
//
// Forms the N x N matrix of partial-product bits pp[j][i] = a_i & b_j, of
// weight 2^(i+j). With tc = 0 the operands are unsigned and this is the
// plain AND matrix. With tc = 1 they are two's complement: the bits that
// involve exactly one sign bit (a_(N-1)b_j and a_i b_(N-1), i, j < N-1) are
// complemented, a_(N-1)b_(N-1) is kept, and two correction bits of value 1
// are added at weights 2^N (k_mid) and 2^(2N-1) (k_msb). With that, every
// bit of the matrix is positive and an ordinary adder array sums it into the
// signed 2N-bit product (mod 2^(2N)). In unsigned mode both correction bits
// are 0. Purely combinational.
//
// The matrix follows the paper's 8x8 algorithm figure; the signed form is
// the standard modified Baugh-Wooley one, which the paper names but does not
// print. Selecting signed or unsigned with the run-time input tc is this
// design's choice.
module bw_ppg #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 tc,
  output logic [N-1:0][N-1:0]  pp,     // pp[j][i]: row j (from b_j), bit i (from a_i)
  output logic                 k_mid,  // weight 2^N
  output logic                 k_msb   // weight 2^(2N-1)
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        // Exactly one of the two indices on the sign position: complement.
        pp[j][i] = (a[i] & b[j]) ^ (tc & ((i == N - 1) != (j == N - 1)));
      end
    end
    k_mid = tc;
    k_msb = tc;
  end
endmodule
