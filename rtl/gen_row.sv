// One row of the generalized four-function array.
//
// W square/square-root cells side by side, columns 0..W-1. Only the cells at
// columns lo..W-1 take part in the row's arithmetic; the columns below lo
// still hold untouched operand bits and later rows' subtrahend entries, which
// pass straight down. Which columns are live depends on the operation, so lo
// is an input: the same physical row serves the division step for quotient
// bit j (lo = j) and the square-root step for root bit k (lo = 2k).
//
// The live cells add the gated operand (the subtrahend bits (b,d), XORed
// with x inside the cell) to the carry-save remainder (sv, cv). Their (g,h)
// outputs move one column right to form the next row's subtrahend pair; a
// column below the window passes its own pair down unchanged, and the two
// are ORed (they never overlap). The row's switch bit is the sign result q
// when x = 1 and the external bit ext (multiplier or square operand bit)
// when x = 0; act = 0 turns the row into a pure transfer row.
//
// Sign: column W-1 is one column above every operand, so the row works
// modulo 2^W and the sum bit of column W-1 is the sign of the trial result.
// It is x_top ^ e_top ^ c_cla, with c_cla from a two-level sign look-ahead
// over the cells' G/P terms. The lowest live cell gets the expected carry-in
// x; when the row keeps a subtraction, the matching +1 is put into the free
// carry slot at column lo of the outgoing carry vector. Combinational.
module gen_row #(
  parameter int unsigned W  = 9,
  parameter int unsigned LW = $clog2(W)
) (
  input  logic [W-1:0]  sv,
  input  logic [W-1:0]  cv,
  input  logic [W-1:0]  bv,
  input  logic [W-1:0]  dv,
  input  logic [LW-1:0] lo,
  input  logic          x,
  input  logic          act,
  input  logic          ext,
  output logic [W-1:0]  sv_o,
  output logic [W-1:0]  cv_o,
  output logic [W-1:0]  bv_o,
  output logic [W-1:0]  dv_o,
  output logic          q,
  output logic          sel
);
  logic [W-1:0] live;
  logic [W-1:0] cs, cc, ce, cg, cp, cgs, chs;
  logic [W:0]   e_chain;
  logic         c_cla;

  always_comb begin
    for (int i = 0; i < int'(W); i++) live[i] = (i >= int'(lo));
  end

  assign sel = act & (x ? q : ext);

  for (genvar i = 0; i < int'(W); i++) begin : g_col
    assign e_chain[i] = (i == 0) ? x : (live[i-1] ? ce[i-1] : x);
    sqrt_cell u_cell (
      .a(sv[i]), .b(bv[i]), .c(cv[i]), .d(dv[i]), .e_in(e_chain[i]), .r(sel), .x(x),
      .s(cs[i]), .c_out(cc[i]), .e_out(ce[i]), .g(cg[i]), .p(cp[i]),
      .g_sub(cgs[i]), .h_sub(chs[i])
    );
  end
  assign e_chain[W] = ce[W-1];

  logic [W-2:0] lg, lp;
  always_comb begin
    for (int i = 0; i < int'(W) - 1; i++) begin
      lg[i] = live[i] & cg[i];
      lp[i] = live[i] & cp[i];
    end
  end
  sign_lookahead #(.K(W - 1)) u_sla (.g(lg), .p(lp), .cin(1'b0), .cout(c_cla));

  // sign = sum bit of the top column of the trial addition
  assign q = ~(sv[W-1] ^ bv[W-1] ^ x ^ cv[W-1] ^ e_chain[W-1] ^ c_cla);

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      sv_o[i] = live[i] ? cs[i] : sv[i];
      // carries of live cells move up one column; the top carry leaves the row
      cv_o[i] = live[i] ? ((i > 0 && live[i-1]) ? cc[i-1] : 1'b0) : cv[i];
      if (i == int'(lo)) cv_o[i] = cv_o[i] | (x & sel);
      bv_o[i] = ((i + 1 < int'(W) && live[i+1]) ? cgs[(i+1) % W] : 1'b0) | (live[i] ? 1'b0 : bv[i]);
      dv_o[i] = ((i + 1 < int'(W) && live[i+1]) ? chs[(i+1) % W] : 1'b0) | (live[i] ? 1'b0 : dv[i]);
    end
  end
endmodule
