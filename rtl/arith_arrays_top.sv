// Carry-save array arithmetic units, side by side.
//
// The main unit is gen_pipeline_array, the pipelined array that multiplies,
// divides, squares and extracts square roots (ports without prefix). Beside
// it stand the separate, combinational arrays from which it is derived,
// each with its own ports:
//   md_*  muldiv_array       multiply (x=0) or divide (x=1)
//   ss_*  sqrt_square_array  square (x=0) or square root (x=1)
//   rd_*  restoring_divider  carry-save restoring divider
//   fd_*  fast_divider       divider with restoration in the next row
//   rm_*  rs_multiplier      right-shift multiplier s = a + b*p + d
// A system with separate multiply/divide and square/root units would use
// md_* and ss_*; a single shared unit would use the pipelined array. All
// units work on N-bit operands (N = 4). Only the pipelined array is clocked
// (latency N+2 cycles, one operand set per cycle); the others settle
// combinationally. clk and rst_n also reach muldiv_array and
// sqrt_square_array, which use them only when built with PIPELINED = 1.
module arith_arrays_top
  import arith_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // pipelined four-function array
  input  logic           in_valid,
  input  op_e            op,
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   pf,
  output logic           out_valid,
  output op_e            out_op,
  output logic [N-1:0]   qr,
  output logic [2*N-1:0] s,
  // multiplier-divider
  input  logic           md_x,
  input  logic [2*N-2:0] md_a,
  input  logic [N-1:0]   md_b,
  input  logic [N-1:0]   md_p,
  output logic [N-1:0]   md_q,
  output logic [2*N-1:0] md_s,
  // square / square root
  input  logic           ss_x,
  input  logic [2*N-1:0] ss_a,
  input  logic [N-1:0]   ss_f,
  output logic [N-1:0]   ss_r,
  output logic [2*N-1:0] ss_s,
  // restoring divider
  input  logic [2*N-2:0] rd_a,
  input  logic [N-1:0]   rd_b,
  output logic [N-1:0]   rd_q,
  output logic [N-1:0]   rd_rem,
  // divider with modified cells
  input  logic [2*N-2:0] fd_a,
  input  logic [N-1:0]   fd_b,
  output logic [N-1:0]   fd_q,
  output logic [N-1:0]   fd_rem,
  // right-shift multiplier
  input  logic [N-1:0]   rm_a,
  input  logic [N-1:0]   rm_d,
  input  logic [N-1:0]   rm_b,
  input  logic [N-1:0]   rm_p,
  output logic [2*N-1:0] rm_s
);
  gen_pipeline_array #(.N(N)) u_gen (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a), .b(b), .pf(pf),
    .out_valid(out_valid), .out_op(out_op), .qr(qr), .s(s)
  );

  muldiv_array #(.N(N)) u_md (
    .clk(clk), .rst_n(rst_n), .x(md_x), .a(md_a), .b(md_b), .p(md_p), .q(md_q), .s(md_s)
  );

  sqrt_square_array #(.N(N)) u_ss (
    .clk(clk), .rst_n(rst_n), .x(ss_x), .a(ss_a), .f(ss_f), .r(ss_r), .s(ss_s)
  );

  restoring_divider #(.N(N)) u_rd (
    .a(rd_a), .b(rd_b), .q(rd_q), .rem(rd_rem)
  );

  fast_divider #(.N(N)) u_fd (
    .a(fd_a), .b(fd_b), .q(fd_q), .rem(fd_rem)
  );

  rs_multiplier #(.N(N)) u_rm (
    .a(rm_a), .d(rm_d), .b(rm_b), .p(rm_p), .s(rm_s)
  );
endmodule
