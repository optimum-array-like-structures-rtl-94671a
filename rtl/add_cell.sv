// Add/transfer cell of the carry-save multiplier arrays.
//
// The multiplicand bit b is added to the partial-sum bit a and the incoming
// carry c1 only when the multiplier bit p is 1; otherwise a and c1 are just
// added. It is an AND gate in front of a full adder:
//   s  = a ^ c1 ^ (b & p)
//   c2 = a&c1 | (a|c1)&(b&p)
// b and p are also passed on unchanged (bo, po) so that the cell can be tiled
// with b running diagonally and p running along a row. Purely combinational.
module add_cell (
  input  logic a,
  input  logic b,
  input  logic c1,
  input  logic p,
  output logic s,
  output logic c2,
  output logic bo,
  output logic po
);
  logic bp;

  always_comb begin
    bp = b & p;
    s  = a ^ c1 ^ bp;
    c2 = (a & c1) | ((a | c1) & bp);
    bo = b;
    po = p;
  end
endmodule
