// Square-root / square array (control line x).
//
//   x = 1  square root : r = floor(sqrt(a)), s = a - r*r
//   x = 0  square      : s = a + f*f (mod 2^2N; with a = 0, s = f*f)
// a has 2N bits, r and f N bits. Row k (k = N-1 first) decides root bit
// r[k] by trying to subtract (4*R + 1) * 4^k, where R is the root found so
// far; adding the same terms gated by the bits of f builds f*f, since
// (2R + f_k)^2 = 4R^2 + f_k*(4R + 1). The subtrahend is never stored as a
// number: it travels through the array as bit pairs (b, d). Each cell passes
// its pair one column to the right for the next row, rewriting it with the
// row's root bit: (0,1) becomes (r, r), (1,0) becomes (0,1) and equal pairs
// pass unchanged. The first row is fed (b,d) = (0,1),(1,0) in its two top
// columns and every later row gets a fresh (1,0) in its lowest column.
//
// Partial remainders are kept in carry-save form and the +1 of the two's
// complement enters as the lowest cell's expected carry and, when the row
// keeps its subtraction, as a 1 in the next row's free carry slot. Row k has
// cells from column 2k up to column 2N, one column above the operand, whose
// sum bit is the sign of the trial difference: the root bit is the inverse
// of x_top ^ e_top ^ c_cla, with c_cla from a two-level sign look-ahead over
// the cells below. A final carry-look-ahead adder gives s.
//
// Timing: with PIPELINED = 0 (the default) the array is combinational and
// clk and rst_n are unused. With PIPELINED = 1 a bank of latches follows the
// operand inputs and every row, so a new operand set can enter on every
// clock and its result appears N+1 rising edges later; rst_n is a
// synchronous active-low reset of all latches. Each bank holds the operands,
// x, the carry-save rows and subtrahend pairs formed so far and the root bits
// found so far.
module sqrt_square_array #(
  parameter int unsigned N = 4,
  parameter bit          PIPELINED = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x,
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   f,
  output logic [N-1:0]   r,
  output logic [2*N-1:0] s
);
  localparam int unsigned W = 2 * N + 1;

  typedef struct packed {
    logic              x;
    logic [2*N-1:0]    a;
    logic [N-1:0]      f;
    logic [N-1:0][W:0] sm;   // sum vector left by row k
    logic [N-1:0][W:0] cy;   // carry vector left by row k
    logic [N-1:0][W:0] gs;   // subtrahend pairs handed on by row k
    logic [N-1:0][W:0] hs;
    logic [N-1:0]      qc;   // root bits found so far
  } stage_t;

  // st[0]: operands; st[t]: after row N-t (t = 1..N)
  stage_t [N:0] st, nx;

  always_comb begin
    nx[0]   = '0;
    nx[0].x = x;
    nx[0].a = a;
    nx[0].f = f;
  end

  for (genvar k = 0; k < int'(N); k++) begin : g_row
    localparam int unsigned T = N - 1 - k;   // bank this row reads
    logic              xr, sel, qk;
    logic [W-1:2*k]    sm_r, gg, pp, gs_r, hs_r;
    logic [W:2*k+1]    cy_r, ey;

    assign xr  = st[T].x;
    assign sel = xr ? qk : st[T].f[k];

    for (genvar i = 2 * k; i < int'(W); i++) begin : g_col
      logic ain, cin, bin, din, ein;
      // partial remainder, sum vector
      if (i == int'(W) - 1 && (k == int'(N) - 1 || i < 2 * k + 2)) begin : g_ain_top
        assign ain = 1'b0;
      end else if (k == int'(N) - 1 || i < 2 * k + 2) begin : g_ain_ext
        assign ain = st[T].a[i];
      end else begin : g_ain_int
        assign ain = st[T].sm[k+1][i];
      end
      // partial remainder, carry vector (free slot 2k+2 takes the pending +1)
      if (k == int'(N) - 1 || i < 2 * k + 2) begin : g_cin_zero
        assign cin = 1'b0;
      end else if (i == 2 * k + 2) begin : g_cin_one
        assign cin = xr & st[T].qc[k+1];
      end else begin : g_cin_int
        assign cin = st[T].cy[k+1][i];
      end
      // subtrahend pair
      if (k == int'(N) - 1) begin : g_bd_first
        assign bin = (i == 2 * int'(N) - 2);
        assign din = (i == 2 * int'(N) - 1);
      end else if (i == 2 * k) begin : g_bd_new
        assign bin = 1'b1;
        assign din = 1'b0;
      end else if (i == int'(W) - 1) begin : g_bd_top
        assign bin = 1'b0;
        assign din = 1'b0;
      end else begin : g_bd_int
        assign bin = st[T].gs[k+1][i+1];
        assign din = st[T].hs[k+1][i+1];
      end
      if (i == 2 * k) begin : g_ein_low
        assign ein = xr;
      end else begin : g_ein_chain
        assign ein = ey[i];
      end
      sqrt_cell u_cell (
        .a(ain), .b(bin), .c(cin), .d(din), .e_in(ein), .r(sel), .x(xr),
        .s(sm_r[i]), .c_out(cy_r[i+1]), .e_out(ey[i+1]),
        .g(gg[i]), .p(pp[i]), .g_sub(gs_r[i]), .h_sub(hs_r[i])
      );
      if (i == int'(W) - 1) begin : g_sign
        logic c_cla, x_top;
        // half-sum of the top column (its subtrahend bit is 0, so b^x = x)
        assign x_top = ain ^ cin ^ xr;
        sign_lookahead #(.K(W - 1 - 2 * k)) u_sla (
          .g(gg[W-2:2*k]), .p(pp[W-2:2*k]), .cin(1'b0), .cout(c_cla)
        );
        assign qk = ~(x_top ^ ey[W-1] ^ c_cla);
      end
    end

    always_comb begin
      nx[T+1]       = st[T];
      nx[T+1].qc[k] = qk;
      for (int i = 2 * k; i < int'(W); i++) begin
        nx[T+1].sm[k][i]   = sm_r[i];
        nx[T+1].cy[k][i+1] = cy_r[i+1];
        nx[T+1].gs[k][i]   = gs_r[i];
        nx[T+1].hs[k][i]   = hs_r[i];
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

  stage_t fin;
  assign fin = st[N];
  assign r   = fin.x ? fin.qc : '0;

  logic [W-1:0] sum;
  logic         cout_unused;
  cla_adder #(.W(W)) u_cla (
    .a(fin.sm[0][W-1:0]), .b({fin.cy[0][W-1:1], 1'b0}), .cin(fin.x & fin.qc[0]),
    .sum(sum), .cout(cout_unused)
  );
  assign s = sum[2*N-1:0];
endmodule
