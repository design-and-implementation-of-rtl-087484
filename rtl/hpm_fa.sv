// hpm_fa -- full-adder cell of the HPM reduction tree.
//
// Adds two bits of a column (the sum coming down from the cell above, or
// partial products for the top cell of a column) and the carry arriving from
// the cell on its right. The sum stays in the column and the carry (the
// majority of the three inputs) goes to the cell on the left. Purely
// combinational. The cell's role follows the paper's adder-cell drawing; the
// XOR/majority gate form is the usual one.
module hpm_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
