// Carry-save restoring divider array: q = a / b, rem = a mod b.
//
// Divides a (2N-1 bits) by b (N bits), giving N quotient bits and an N-bit
// remainder; a must be below b*2^N (quotient fits) and b nonzero. Row j
// (j = N-1 first) tries to subtract b*2^j by adding the complemented divisor
// bits to the partial remainder, which is kept as two carry-save vectors.
// The +1 that completes the two's complement is not added in the row itself:
// the lowest cell sees it only as the expected carry-in e = 1, and when the
// row keeps its subtraction (q = 1) the 1 is dropped into the empty carry
// slot of the next row.
//
// The quotient bit is the sign of the trial difference. Row j's cells cover
// columns j..j+N-1; column j+N, which has no cell, holds the sign. Its bit is
// the XOR of the four things that land in it: the sum bit s and carry c1 the
// previous row left in that column, the expected carry c2 of the top cell,
// and c_cla, the carry produced by a two-level sign look-ahead over the
// cells' generate/propagate terms. The parity form needs no correction term
// for a carry-save overflow left pending by the row above: such an overflow
// has weight 2^(j+N+1) and does not change bit j+N. When q = 0 the cells
// just pass a + c on (restoring in carry-save form).
//
// After the last row an N-bit carry-look-ahead adder adds the two vectors
// and the pending +1 to form the remainder. Delay is about N times (cell +
// look-ahead + XOR). Combinational.
module restoring_divider #(
  parameter int unsigned N = 4
) (
  input  logic [2*N-2:0] a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   q,
  output logic [N-1:0]   rem
);
  logic [N-1:0][2*N:0] sm, cy, ey, gg, pp;

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    for (genvar i = j; i < j + int'(N); i++) begin : g_col
      logic ain, cin, ein, bo_unused, qo_unused;
      if (i == j || j == int'(N) - 1) begin : g_ain_ext
        assign ain = a[i];
      end else begin : g_ain_int
        assign ain = sm[j+1][i];
      end
      if (j == int'(N) - 1 || i == j) begin : g_cin_zero
        assign cin = 1'b0;
      end else if (i == j + 1) begin : g_cin_one
        assign cin = q[j+1];
      end else begin : g_cin_int
        assign cin = cy[j+1][i];
      end
      assign ein = (i == j) ? 1'b1 : ey[j][i];
      div_cell u_cell (
        .a(ain), .b(~b[i-j]), .c(cin), .e_in(ein), .q(q[j]),
        .s(sm[j][i]), .c_out(cy[j][i+1]), .e_out(ey[j][i+1]),
        .g(gg[j][i]), .p(pp[j][i]), .bo(bo_unused), .qo(qo_unused)
      );
    end

    logic c_cla, s_in, c1_in;
    sign_lookahead #(.K(N)) u_sla (
      .g(gg[j][j+N-1:j]), .p(pp[j][j+N-1:j]), .cin(1'b0), .cout(c_cla)
    );
    if (j == int'(N) - 1) begin : g_first
      assign s_in  = 1'b0;
      assign c1_in = 1'b0;
    end else begin : g_next
      assign s_in  = sm[j+1][j+N];
      assign c1_in = cy[j+1][j+N];
    end
    assign q[j] = s_in ^ c1_in ^ ey[j][j+N] ^ c_cla;
  end

  logic cout_unused;
  cla_adder #(.W(N)) u_cla (
    .a(sm[0][N-1:0]), .b({cy[0][N-1:1], 1'b0}), .cin(q[0]), .sum(rem), .cout(cout_unused)
  );
endmodule
