// Right-shift carry-save multiplier array: s = a + b*p + d.
//
// N rows of add/transfer cells. The row of the most significant multiplier
// bit p[N-1] comes first and each following row sits one column further
// right, so the array works from the most significant end, the order a
// divider needs. Row j holds N cells at columns j..j+N-1 and adds b*p[j]*2^j
// in carry-save form; the addends a[j] and d[j] enter the rightmost cell of
// row j. Because the rows shift right, the top cell of every row leaves a sum
// and two carries that no later row picks up; instead of padding the array
// with idle cells, one extra row of N-1 full adders (cells with p tied to 1)
// reduces these three bits per column to two, and a carry-look-ahead adder
// adds the final two vectors. Delay is about (N+1) cell delays plus the
// final adder. Combinational; s has 2N bits and cannot overflow.
module rs_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   d,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   p,
  output logic [2*N-1:0] s
);
  // sm[j][i]: sum of row j at column i; cy[j][i]: carry of row j into column i
  logic [N-1:0][2*N:0] sm;
  logic [N-1:0][2*N:0] cy;
  logic [2*N-2:N]      csa_s;
  logic [2*N-1:N+1]    csa_c;
  logic [2*N-1:0]      fx, fy;

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    for (genvar i = j; i < j + int'(N); i++) begin : g_col
      logic ain, cin, bo_unused, po_unused;
      if (i == j) begin : g_edge
        assign ain = a[j];
        assign cin = d[j];
      end else if (j == int'(N) - 1) begin : g_top
        assign ain = 1'b0;
        assign cin = 1'b0;
      end else begin : g_inner
        assign ain = sm[j+1][i];
        assign cin = (i == j + 1) ? 1'b0 : cy[j+1][i];
      end
      add_cell u_cell (
        .a(ain), .b(b[i-j]), .c1(cin), .p(p[j]),
        .s(sm[j][i]), .c2(cy[j][i+1]), .bo(bo_unused), .po(po_unused)
      );
    end
  end

  // extra carry-save row for the bits left over at the top of each row
  for (genvar k = N; k <= 2 * N - 2; k++) begin : g_csa
    logic bo_unused, po_unused;
    add_cell u_csa (
      .a(sm[k-N+1][k]), .b(cy[k-N][k]), .c1(cy[k-N+1][k]), .p(1'b1),
      .s(csa_s[k]), .c2(csa_c[k+1]), .bo(bo_unused), .po(po_unused)
    );
  end

  always_comb begin
    for (int k = 0; k < 2 * int'(N); k++) begin
      if (k < int'(N)) begin
        fx[k] = sm[0][k];
        if (k == 0) fy[k] = 1'b0;
        else        fy[k] = cy[0][k];
      end else if (k <= 2 * int'(N) - 2) begin
        fx[k] = csa_s[k];
        if (k == int'(N)) fy[k] = 1'b0;
        else              fy[k] = csa_c[k];
      end else begin
        fx[k] = cy[N-1][k];
        fy[k] = csa_c[k];
      end
    end
  end

  logic cout_unused;
  cla_adder #(.W(2 * N)) u_cla (.a(fx), .b(fy), .cin(1'b0), .sum(s), .cout(cout_unused));
endmodule
