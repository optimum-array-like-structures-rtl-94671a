// Restoring divider built from modified cells: q = a / b, rem = a mod b.
//
// Same arithmetic as restoring_divider (a of 2N-1 bits, b of N bits,
// a < b*2^N, b != 0), but restoration is moved into the following row. Each
// row computes, without waiting for its own quotient bit, both the "added"
// carry-save pair (remainder + complemented divisor) and the "transfer" pair
// (remainder alone). The switches of the next row pick one of the two pairs
// with the quotient bit of the row above, so a quotient bit drives only one
// level of switches instead of the gating in every cell of its own row. The
// pending +1 of the two's complement travels in the added pair only (as a 1
// in the free carry slot), and the sign-column bits s and c1 are selected
// the same way before the four-input XOR that gives the quotient bit. After
// the last row a final switch picks the pair and an N-bit carry-look-ahead
// adder forms the remainder. Combinational.
module fast_divider #(
  parameter int unsigned N = 4
) (
  input  logic [2*N-2:0] a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   q,
  output logic [N-1:0]   rem
);
  // added pair (sm, cy) and transfer pair (st, ct), per row and column
  logic [N-1:0][2*N:0] sm, cy, st, ct, ey, gg, pp;

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    logic qp;   // quotient bit of the row above
    if (j == int'(N) - 1) begin : g_qp_first
      assign qp = 1'b1;
    end else begin : g_qp
      assign qp = q[j+1];
    end

    for (genvar i = j; i < j + int'(N); i++) begin : g_col
      logic ain, atin, cin, ctin, ein;
      if (i == j || j == int'(N) - 1) begin : g_ain_ext
        assign ain  = a[i];
        assign atin = a[i];
      end else begin : g_ain_int
        assign ain  = sm[j+1][i];
        assign atin = st[j+1][i];
      end
      if (j == int'(N) - 1 || i == j) begin : g_cin_zero
        assign cin  = 1'b0;
        assign ctin = 1'b0;
      end else if (i == j + 1) begin : g_cin_one
        assign cin  = 1'b1;    // pending +1 of the row above, added pair only
        assign ctin = 1'b0;
      end else begin : g_cin_int
        assign cin  = cy[j+1][i];
        assign ctin = ct[j+1][i];
      end
      assign ein = (i == j) ? 1'b1 : ey[j][i];
      mod_div_cell u_cell (
        .q_prev(qp), .a(ain), .a_t(atin), .c(cin), .c_t(ctin), .b(~b[i-j]), .e_in(ein),
        .s(sm[j][i]), .s_t(st[j][i]), .c_out(cy[j][i+1]), .c_t_out(ct[j][i+1]),
        .e_out(ey[j][i+1]), .g(gg[j][i]), .p(pp[j][i])
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
      assign s_in  = qp ? sm[j+1][j+N] : st[j+1][j+N];
      assign c1_in = qp ? cy[j+1][j+N] : ct[j+1][j+N];
    end
    assign q[j] = s_in ^ c1_in ^ ey[j][j+N] ^ c_cla;
  end

  logic [N-1:0] fs, fc;
  always_comb begin
    fc[0] = 1'b0;
    for (int i = 0; i < int'(N); i++) fs[i] = q[0] ? sm[0][i] : st[0][i];
    for (int i = 1; i < int'(N); i++) fc[i] = q[0] ? cy[0][i] : ct[0][i];
  end

  logic cout_unused;
  cla_adder #(.W(N)) u_cla (.a(fs), .b(fc), .cin(q[0]), .sum(rem), .cout(cout_unused));
endmodule
