// Sign-bit carry-look-ahead circuit.
//
// Given the generate and propagate terms g[i], p[i] of K columns (column 0
// lowest) and a carry into column 0, returns the carry out of column K-1 as
// one two-level AND-OR (sum of products) expression:
//   cout = OR_i ( g[i] & p[i+1] & ... & p[K-1] )  |  cin & p[0] & ... & p[K-1]
// p may be the inclusive OR of the two bits (either form gives the same
// carry). Used once per array row to learn, before the row's carry-save sums
// settle, whether the trial subtraction went negative. Combinational.
module sign_lookahead #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] g,
  input  logic [K-1:0] p,
  input  logic         cin,
  output logic         cout
);
  always_comb begin
    logic term;
    cout = 1'b0;
    for (int i = -1; i < int'(K); i++) begin
      term = (i < 0) ? cin : g[i];
      for (int k = i + 1; k < int'(K); k++) term = term & p[k];
      cout = cout | term;
    end
  end
endmodule
