// Modified divider cell: restoration moved into the next row.
//
// The plain divider cell has to wait for its row's quotient bit before its
// sum and carry are valid. This cell instead produces both candidates of its
// row at once: the "added" pair (a + c + b, with b the complemented divisor
// bit) and the "transfer" pair (a + c, no divisor). The next row receives
// both pairs and a switch, steered by the quotient bit of the row above
// (q_prev), picks which pair to use, so the quotient bit only has to reach
// one switch level below instead of every cell of its own row.
//   (sa, sc)  = q_prev ? (a, c) : (a_t, c_t)       switch
//   s   = sa ^ sc ^ b    c_out   = maj(sa, b, sc)  added pair
//   s_t = sa ^ sc        c_t_out = sa & sc         transfer pair
//   e_out = c_out, g = s & e_in, p = s | e_in      sign look-ahead terms
// The original cell works on complemented (active-low) signals to save
// inverters; this model uses active-high signals with the same function.
// Combinational.
module mod_div_cell (
  input  logic q_prev,
  input  logic a,
  input  logic a_t,
  input  logic c,
  input  logic c_t,
  input  logic b,
  input  logic e_in,
  output logic s,
  output logic s_t,
  output logic c_out,
  output logic c_t_out,
  output logic e_out,
  output logic g,
  output logic p
);
  logic sa;
  logic sc;

  always_comb begin
    sa      = q_prev ? a : a_t;
    sc      = q_prev ? c : c_t;
    s       = sa ^ sc ^ b;
    c_out   = (sa & sc) | ((sa | sc) & b);
    s_t     = sa ^ sc;
    c_t_out = sa & sc;
    e_out   = c_out;
    g       = s & e_in;
    p       = s | e_in;
  end
endmodule
