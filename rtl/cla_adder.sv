// Carry-look-ahead adder for the final addition of the two partial sums.
//
// W-bit adder built from 4-bit look-ahead groups: inside a group every carry
// is a two-level function of the group's generate/propagate bits and the
// group carry-in; the group carries themselves come from a second look-ahead
// level over the group generate/propagate terms. Returns sum and carry out.
// Combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;

  logic [4*NG-1:0] ga, pa;
  logic [NG-1:0]   gg, gp;
  logic [NG:0]     gc;
  logic [4*NG:0]   c;

  always_comb begin
    ga = '0;
    pa = '0;
    for (int i = 0; i < int'(W); i++) begin
      ga[i] = a[i] & b[i];
      pa[i] = a[i] ^ b[i];
    end
    // group generate / propagate
    for (int j = 0; j < int'(NG); j++) begin
      gg[j] = ga[4*j+3] | (pa[4*j+3] & ga[4*j+2]) | (pa[4*j+3] & pa[4*j+2] & ga[4*j+1])
            | (pa[4*j+3] & pa[4*j+2] & pa[4*j+1] & ga[4*j]);
      gp[j] = &pa[4*j +: 4];
    end
    // second level: group carries as sums of products
    for (int j = 0; j <= int'(NG); j++) begin
      logic t;
      gc[j] = 1'b0;
      for (int i = -1; i < j; i++) begin
        t = (i < 0) ? cin : gg[i];
        for (int k = i + 1; k < j; k++) t = t & gp[k];
        gc[j] = gc[j] | t;
      end
    end
    // carries inside each group
    for (int j = 0; j < int'(NG); j++) begin
      c[4*j]   = gc[j];
      c[4*j+1] = ga[4*j] | (pa[4*j] & gc[j]);
      c[4*j+2] = ga[4*j+1] | (pa[4*j+1] & ga[4*j]) | (pa[4*j+1] & pa[4*j] & gc[j]);
      c[4*j+3] = ga[4*j+2] | (pa[4*j+2] & ga[4*j+1]) | (pa[4*j+2] & pa[4*j+1] & ga[4*j])
               | (pa[4*j+2] & pa[4*j+1] & pa[4*j] & gc[j]);
    end
    c[4*NG] = gc[NG];
    for (int i = 0; i < int'(W); i++) sum[i] = pa[i] ^ c[i];
    cout = c[W];
  end
endmodule
