// Combined multiplier-divider array (control line x).
//
// One grid of divider cells serves both operations:
//   x = 0  multiply : s = a + b*p   (mod 2^2N; with a = 0, s = b*p)
//   x = 1  divide   : q = a / b, s[N-1:0] = a mod b  (a < b*2^N, b != 0)
// The divisor/multiplicand bits pass through XOR gates with x, so they are
// complemented only for division. Per row a switch feeds the cells either the
// multiplier bit p[j] (x = 0) or the row's own quotient bit (x = 1), and an
// AND gate with x lets the pending +1 of the two's complement into the next
// row only when dividing. The quotient bit of each row comes from the same
// sign logic as the stand-alone divider: the parity of the previous row's
// sum and carry in the sign column, the top cell's expected carry, and a
// two-level sign look-ahead over the row's G/P terms (unused when
// multiplying). The rows shift right, so as in the right-shift multiplier an
// extra row of N-1 full adders gathers the bits left at the top of each row
// before the final 2N-bit carry-look-ahead adder, which also adds the
// divider's last pending +1 as its carry-in. In division mode the upper half
// of s is not meaningful; q reads 0 when multiplying.
//
// Timing: with PIPELINED = 0 (the default) the array is combinational and
// clk and rst_n are unused. With PIPELINED = 1 a bank of latches follows the
// operand inputs and every row, so a new operand set can enter on every
// clock and its result appears N+1 rising edges later; rst_n is a
// synchronous active-low reset of all latches. Each bank holds the operands,
// x, the carry-save rows formed so far and the quotient bits found so far.
module muldiv_array #(
  parameter int unsigned N = 4,
  parameter bit          PIPELINED = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x,
  input  logic [2*N-2:0] a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   p,
  output logic [N-1:0]   q,
  output logic [2*N-1:0] s
);
  typedef struct packed {
    logic                x;
    logic [2*N-2:0]      a;
    logic [N-1:0]        b;
    logic [N-1:0]        p;
    logic [N-1:0][2*N:0] sm;   // sum vector left by row j
    logic [N-1:0][2*N:0] cy;   // carry vector left by row j
    logic [N-1:0]        qc;   // quotient bits found so far
  } stage_t;

  // st[0]: operands; st[t]: after row N-t (t = 1..N)
  stage_t [N:0] st, nx;

  always_comb begin
    nx[0]   = '0;
    nx[0].x = x;
    nx[0].a = a;
    nx[0].b = b;
    nx[0].p = p;
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_row
    localparam int unsigned T = N - 1 - j;   // bank this row reads
    logic               xr, sel, qj;
    logic [N-1:0]       bx;
    logic [j+N-1:j]     sm_r, gg, pp;
    logic [j+N:j+1]     cy_r, ey;

    assign xr  = st[T].x;
    assign bx  = st[T].b ^ {N{xr}};
    // row switch: multiplier bit or quotient bit
    assign sel = xr ? qj : st[T].p[j];

    for (genvar i = j; i < j + int'(N); i++) begin : g_col
      logic ain, cin, ein, bo_unused, qo_unused;
      if (i == j || j == int'(N) - 1) begin : g_ain_ext
        assign ain = st[T].a[i];
      end else begin : g_ain_int
        assign ain = st[T].sm[j+1][i];
      end
      if (j == int'(N) - 1 || i == j) begin : g_cin_zero
        assign cin = 1'b0;
      end else if (i == j + 1) begin : g_cin_one
        assign cin = xr & st[T].qc[j+1];
      end else begin : g_cin_int
        assign cin = st[T].cy[j+1][i];
      end
      if (i == j) begin : g_ein_low
        assign ein = xr;
      end else begin : g_ein_chain
        assign ein = ey[i];
      end
      div_cell u_cell (
        .a(ain), .b(bx[i-j]), .c(cin), .e_in(ein), .q(sel),
        .s(sm_r[i]), .c_out(cy_r[i+1]), .e_out(ey[i+1]),
        .g(gg[i]), .p(pp[i]), .bo(bo_unused), .qo(qo_unused)
      );
    end

    logic c_cla, s_in, c1_in;
    sign_lookahead #(.K(N)) u_sla (.g(gg), .p(pp), .cin(1'b0), .cout(c_cla));
    if (j == int'(N) - 1) begin : g_first
      assign s_in  = 1'b0;
      assign c1_in = 1'b0;
    end else begin : g_next
      assign s_in  = st[T].sm[j+1][j+N];
      assign c1_in = st[T].cy[j+1][j+N];
    end
    assign qj = s_in ^ c1_in ^ ey[j+N] ^ c_cla;

    always_comb begin
      nx[T+1]        = st[T];
      nx[T+1].qc[j]  = qj;
      for (int i = j; i < j + int'(N); i++) begin
        nx[T+1].sm[j][i]   = sm_r[i];
        nx[T+1].cy[j][i+1] = cy_r[i+1];
      end
    end
  end

  if (PIPELINED) begin : g_latch
    always_ff @(posedge clk) begin
      if (!rst_n) st <= '0;
      else        st <= nx;
    end
  end else begin : g_wire
    assign st = nx;
  end

  stage_t          fin;
  logic [2*N-2:N]   csa_s;
  logic [2*N-1:N+1] csa_c;
  logic [2*N-1:0]   fx, fy;

  assign fin = st[N];
  assign q   = fin.x ? fin.qc : '0;

  // extra carry-save row for the bits left over at the top of each row
  for (genvar k = N; k <= 2 * N - 2; k++) begin : g_csa
    logic bo_unused, po_unused;
    add_cell u_csa (
      .a(fin.sm[k-N+1][k]), .b(fin.cy[k-N][k]), .c1(fin.cy[k-N+1][k]), .p(1'b1),
      .s(csa_s[k]), .c2(csa_c[k+1]), .bo(bo_unused), .po(po_unused)
    );
  end

  always_comb begin
    for (int k = 0; k < 2 * int'(N); k++) begin
      if (k < int'(N)) begin
        fx[k] = fin.sm[0][k];
        if (k == 0) fy[k] = 1'b0;
        else        fy[k] = fin.cy[0][k];
      end else if (k <= 2 * int'(N) - 2) begin
        fx[k] = csa_s[k];
        if (k == int'(N)) fy[k] = 1'b0;
        else              fy[k] = csa_c[k];
      end else begin
        fx[k] = fin.cy[N-1][k];
        fy[k] = csa_c[k];
      end
    end
  end

  logic cout_unused;
  cla_adder #(.W(2 * N)) u_cla (.a(fx), .b(fy), .cin(fin.x & fin.qc[0]), .sum(s), .cout(cout_unused));
endmodule
