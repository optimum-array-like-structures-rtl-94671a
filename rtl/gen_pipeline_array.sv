// Generalized pipelined array for multiplication, division, square and
// square root, with latches between the rows.
//
// One array of square/square-root cells (gen_row) performs all four
// operations, chosen per operand set by op = {y, x} (see arith_pkg):
//   OP_MUL  : s = a + b*pf            (a = 0 gives the plain product)
//   OP_DIV  : qr = a / b, s = a mod b (a < b*2^N, b != 0)
//   OP_SQR  : s = a + pf*pf
//   OP_SQRT : qr = floor(sqrt(a)), s = a - qr*qr
// a has 2N bits (at most 2N-1 significant bits for division); s is read
// modulo 2^2N.
//
// There are N+1 rows. The square-root/square steps use rows 1..N and
// multiplication/division rows 2..N+1, so the first row serves only the
// square-root family and the last only the multiply/divide family; in its
// unused row an operation passes through as a transfer (no operand added).
// The subtrahend enters the top as bit pairs (b, d): for y = 0 both carry
// the divisor/multiplicand shifted to the top, for y = 1 they hold the fixed
// pattern that the cells turn into the square-root subtrahends (0,1) at the
// top and (1,0) at every even column. Every row is followed by a bank of
// latches holding the carry-save remainder, the subtrahend pairs, the
// operation, the unused operand bits and the quotient/root bits found so
// far (the storage registers that collect them). After the last latch a
// carry-look-ahead adder forms s.
//
// Timing: one operand set per clock, any mix of operations. A set presented
// with in_valid in cycle t is captured at the input latch on that edge and
// leaves as out_valid/qr/s N+2 edges later. Synchronous active-low reset
// clears every latch.
//
// PIPELINED = 0 turns every latch bank into plain wires: the same rows then
// form one combinational four-function unit (for uses where a single
// operation at a time is enough), with the result valid as soon as the
// inputs settle; clk and rst_n are then unused.
module gen_pipeline_array
  import arith_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  op_e            op,
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   pf,
  output logic           out_valid,
  output op_e            out_op,
  output logic [N-1:0]   qr,
  output logic [2*N-1:0] s
);
  localparam int unsigned W  = 2 * N + 1;
  localparam int unsigned LW = $clog2(W);
  localparam int unsigned R  = N + 1;

  typedef struct packed {
    logic         valid;
    op_e          op;
    logic [W-1:0] sv;
    logic [W-1:0] cv;
    logic [W-1:0] bv;
    logic [W-1:0] dv;
    logic [N-1:0] ext;
    logic [N-1:0] qr;
  } stage_t;

  stage_t [R:0] st;   // st[0]: input latch, st[t]: latch after row t
  stage_t [R:0] nx;

  // input latch contents
  always_comb begin
    nx[0]       = '0;
    nx[0].valid = in_valid;
    nx[0].op    = op;
    nx[0].sv    = W'(a);
    nx[0].cv    = '0;
    nx[0].ext   = pf;
    if (op_y(op)) begin
      for (int i = 0; i < int'(W); i++) nx[0].bv[i] = (i % 2 == 0) && (i <= 2 * int'(N) - 2);
      nx[0].dv = W'(1) << (2 * N - 1);
    end else begin
      nx[0].bv = W'(b) << N;
      nx[0].dv = W'(b) << N;
    end
  end

  for (genvar t = 1; t <= int'(R); t++) begin : g_row
    // row t does multiply/divide step j = N+1-t (t >= 2) and
    // square/square-root step k = N-t (t <= N)
    localparam int unsigned LO_MD = (t == 1) ? N : N + 1 - t;
    localparam int unsigned LO_SQ = (t <= int'(N)) ? 2 * (N - t) : 0;
    localparam int unsigned J     = (t == 1) ? 0 : N + 1 - t;
    localparam int unsigned K     = (t <= int'(N)) ? N - t : 0;

    logic          y, x, act, ext, q, sel;
    logic [LW-1:0] lo;
    logic [W-1:0]  sv_o, cv_o, bv_o, dv_o;

    assign y   = op_y(st[t-1].op);
    assign x   = op_x(st[t-1].op);
    assign act = y ? (t <= int'(N)) : (t >= 2);
    assign lo  = y ? LW'(LO_SQ) : LW'(LO_MD);
    assign ext = y ? st[t-1].ext[K] : st[t-1].ext[J];

    gen_row #(.W(W), .LW(LW)) u_row (
      .sv(st[t-1].sv), .cv(st[t-1].cv), .bv(st[t-1].bv), .dv(st[t-1].dv),
      .lo(lo), .x(x), .act(act), .ext(ext),
      .sv_o(sv_o), .cv_o(cv_o), .bv_o(bv_o), .dv_o(dv_o), .q(q), .sel(sel)
    );

    always_comb begin
      nx[t]    = st[t-1];
      nx[t].sv = sv_o;
      nx[t].cv = cv_o;
      nx[t].bv = bv_o;
      nx[t].dv = dv_o;
      if (act && x) nx[t].qr[y ? K : J] = q;
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

  // operands of a division must give a quotient that fits in N bits
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && op == OP_DIV)
      assert ((W'(a) < (W'(b) << N)) && b != '0)
        else $error("division operands out of range: a=%0d b=%0d", a, b);
  end

  logic [W-1:0] sum;
  logic         cout_unused;
  cla_adder #(.W(W)) u_cla (
    .a(st[R].sv), .b(st[R].cv), .cin(1'b0), .sum(sum), .cout(cout_unused)
  );

  assign out_valid = st[R].valid;
  assign out_op    = st[R].op;
  assign qr        = st[R].qr;
  assign s         = sum[2*N-1:0];
endmodule
