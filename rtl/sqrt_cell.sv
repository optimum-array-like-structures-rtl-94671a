// Square / square-root cell.
//
// Like the divider cell, with two additions: the complementing XOR for
// subtraction sits inside the cell (bx = b ^ x), and the cell rewrites the
// subtrahend for the next row through the control bit d:
//   s     = a ^ c ^ (r & bx)
//   c_out = a&c | (a|c)&(r&bx)
//   e_out = a&c | (a|c)&bx
//   g     = (a^bx^c) & e_in          look-ahead generate
//   p     = (a^bx^c) | e_in          look-ahead propagate
//   g_sub = d & (b | r)              next subtrahend bit (one column right)
//   h_sub = b | (d & r)              next control bit     (one column right)
// With b = d the subtrahend bit passes unchanged; (b,d) = (0,1) turns a 0
// into the root bit r and (1,0) turns a 1 into 0. x = 1 subtracts (square
// root, division), x = 0 adds (square, multiplication). Combinational.
module sqrt_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e_in,
  input  logic r,
  input  logic x,
  output logic s,
  output logic c_out,
  output logic e_out,
  output logic g,
  output logic p,
  output logic g_sub,
  output logic h_sub
);
  logic bx;
  logic hs;
  logic rb;

  always_comb begin
    bx    = b ^ x;
    hs    = a ^ bx ^ c;
    rb    = r & bx;
    s     = a ^ c ^ rb;
    c_out = (a & c) | ((a | c) & rb);
    e_out = (a & c) | ((a | c) & bx);
    g     = hs & e_in;
    p     = hs | e_in;
    g_sub = d & (b | r);
    h_sub = b | (d & r);
  end
endmodule
