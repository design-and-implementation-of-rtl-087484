// hpm_tree -- triangular HPM partial-product reduction tree.
//
// Sums the N x N partial-product bits (plus the correction bits of the
// Baugh-Wooley form) into the 2N-bit product with N-1 half adders and
// (N-1)^2 full adders laid out as a triangle, the 8-bit one being 7 rows of
// 1, 3, 5, ... 13 full adders each with a half adder at its right end.
//
// Layout (rows r = 1 .. N-1 from the apex down, columns c by bit weight):
//   * row r has a half adder at column N-r and full adders at N-r+1 .. N-1+r;
//   * each cell's sum goes straight down to the cell below in its column;
//   * each cell's carry goes left to the next cell of its own row, so every
//     row is a ripple chain that starts at its half adder;
//   * the carry of a row's leftmost cell goes down-left as one of the two
//     upper inputs of the next row's leftmost cell;
//   * the top cell of a column takes two partial products (or one, beside
//     that row-end carry, for columns above N), every lower cell one more;
//   * the bottom row's sums are product bits 1 .. 2N-2, its last carry is
//     bit 2N-1, and column 0's single partial product is bit 0.
// Column N has one input more than it has partial products; that spare
// input takes k_mid. The correction bit of weight 2^(2N-1) has no cell and is
// XORed onto the top product bit, the carry beyond it being dropped.
//
// The triangle, the sum/carry directions and the output numbering follow the
// paper's 8-bit HPM figure; which partial product goes to which input of a
// column is not given there, and this design feeds them in order of rising
// a-index from the top cell down, the spare input last. Purely combinational:
// the longest path runs down a column and along the bottom row's chain.
module hpm_tree
  import hpm_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0][N-1:0] pp,     // pp[j][i]: weight 2^(i+j)
  input  logic                k_mid,  // weight 2^N
  input  logic                k_msb,  // weight 2^(2N-1)
  output logic [2*N-1:0]      p
);
  localparam int unsigned C = 2 * N - 1;   // number of partial-product columns

  // Input bits of each column, in feeding order (index 0 goes to the top cell).
  logic [N-1:0] col_in [C];
  // Sum and carry of the cell in row r, column c (unused entries stay 0).
  logic [C-1:0] sum_rc [N];
  logic [C-1:0] cry_rc [N];

  for (genvar c = 0; c < C; c++) begin : g_col
    for (genvar k = 0; k < N; k++) begin : g_in
      if (c == N && k == N - 1) begin : g_spare
        assign col_in[c][k] = k_mid;
      end else if (k < col_inputs(N, c)) begin : g_pp
        assign col_in[c][k] = pp[c - first_a(N, c) - k][first_a(N, c) + k];
      end else begin : g_none
        assign col_in[c][k] = 1'b0;
      end
    end
  end

  assign sum_rc[0] = '0;
  assign cry_rc[0] = '0;

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_cell
      if (c < N - r || c > N - 1 + r) begin : g_empty
        assign sum_rc[r][c] = 1'b0;
        assign cry_rc[r][c] = 1'b0;
      end else begin : g_adder
        localparam int T = top_row(N, c);
        logic x, y;
        if (r == T && c <= N) begin : g_top_two
          assign x = col_in[c][0];
          assign y = col_in[c][1];
        end else if (r == T) begin : g_top_carry
          assign x = cry_rc[r-1][c-1];   // row-end carry of the row above
          assign y = col_in[c][0];
        end else if (c <= N) begin : g_lower_lo
          assign x = sum_rc[r-1][c];
          assign y = col_in[c][r - T + 1];
        end else begin : g_lower_hi
          assign x = sum_rc[r-1][c];
          assign y = col_in[c][r - T];
        end

        if (c == N - r) begin : g_ha
          hpm_ha u_ha (.a(x), .b(y), .s(sum_rc[r][c]), .co(cry_rc[r][c]));
        end else begin : g_fa
          hpm_fa u_fa (.a(x), .b(y), .ci(cry_rc[r][c-1]),
                       .s(sum_rc[r][c]), .co(cry_rc[r][c]));
        end
      end
    end
  end

  always_comb begin
    p[0] = col_in[0][0];
    for (int c = 1; c < C; c++) p[c] = sum_rc[N-1][c];
    p[2*N-1] = cry_rc[N-1][C-1] ^ k_msb;
  end
endmodule
