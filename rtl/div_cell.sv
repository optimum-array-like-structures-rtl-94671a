// Restoring-divider cell (also used for multiplication).
//
// Gated carry-save adder: the (already complemented) divisor bit b is added to
// the partial remainder bits a and c only when the row's quotient bit q is 1,
// otherwise a and c are transferred (restoring). Independently of q the cell
// forms the "expected" carry e_out of a+b+c and the carry-look-ahead terms of
// the pair (a^b^c, e_in), which the row's sign-bit look-ahead uses to find
// the quotient bit before the gated sums are needed:
//   s     = a ^ c ^ (q & b)
//   c_out = a&c | (a|c)&(q&b)
//   e_out = a&c | (a|c)&b
//   g     = (a^b^c) & e_in
//   p     = (a^b^c) | e_in
// b and q are passed on unchanged. Purely combinational.

module div_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic e_in,
  input  logic q,
  output logic s,
  output logic c_out,
  output logic e_out,
  output logic g,
  output logic p,
  output logic bo,
  output logic qo
);
  logic hs;
  logic qb;

  always_comb begin
    hs    = a ^ b ^ c;
    qb    = q & b;
    s     = a ^ c ^ qb;
    c_out = (a & c) | ((a | c) & qb);
    e_out = (a & c) | ((a | c) & b);
    g     = hs & e_in;
    p     = hs | e_in;
    bo    = b;
    qo    = q;
  end
endmodule
