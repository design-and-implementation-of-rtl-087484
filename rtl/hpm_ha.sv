// hpm_ha -- half-adder cell of the HPM reduction tree.
//
// Takes two bits of one column of the triangle and replaces them with one
// sum bit that stays in the column and one carry bit for the next more
// significant column, so a column of K bits leaves the cell as K-1 bits plus
// a carry. In the tree it is the rightmost cell of every row, where no carry
// arrives from the right. Purely combinational. The cell's role follows the
// paper's adder-cell drawing; the XOR/AND gate form is the usual one.
module hpm_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
