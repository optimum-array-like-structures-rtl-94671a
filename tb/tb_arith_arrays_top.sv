// End-to-end testbench for arith_arrays_top at its default size (N = 4).
//
// Streams a random mix of all four operations through the pipelined array
// (one set per clock with idle gaps, each result checked N+2 cycles later)
// and, on the same clock, drives random operands into the five
// combinational arrays and checks them with integer arithmetic. It counts
// how often each mechanism occurs and fails if one never does:
//   - each operation of the pipelined array, and a change of operation
//     between back-to-back operand sets
//   - a completely full pipeline (N+2 operations in flight)
//   - multiply and divide mode of the multiplier-divider, square and root
//     mode of the square/root array
//   - restoring rows (quotient bit 0) and subtracting rows (quotient bit 1)
//   - a carry-save overflow left pending in the remainder for the next row
//     (the sign look-ahead of a divider row producing a carry)
module tb_arith_arrays_top;
  import arith_pkg::*;
  localparam int N   = 4;
  localparam int LAT = N + 2;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  op_e  op = OP_MUL;
  logic [7:0] a = '0;
  logic [3:0] b = '0, pf = '0;
  logic out_valid;
  op_e  out_op;
  logic [3:0] qr;
  logic [7:0] s;

  logic md_x = 1'b0, ss_x = 1'b0;
  logic [6:0] md_a = '0, rd_a = '0, fd_a = '0;
  logic [3:0] md_b = '0, md_p = '0, md_q, rd_b = 4'd1, rd_q, rd_rem, fd_b = 4'd1, fd_q, fd_rem;
  logic [7:0] md_s, ss_a = '0, ss_s, rm_s;
  logic [3:0] ss_f = '0, ss_r, rm_a = '0, rm_d = '0, rm_b = '0, rm_p = '0;

  arith_arrays_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a), .b(b), .pf(pf),
    .out_valid(out_valid), .out_op(out_op), .qr(qr), .s(s),
    .md_x(md_x), .md_a(md_a), .md_b(md_b), .md_p(md_p), .md_q(md_q), .md_s(md_s),
    .ss_x(ss_x), .ss_a(ss_a), .ss_f(ss_f), .ss_r(ss_r), .ss_s(ss_s),
    .rd_a(rd_a), .rd_b(rd_b), .rd_q(rd_q), .rd_rem(rd_rem),
    .fd_a(fd_a), .fd_b(fd_b), .fd_q(fd_q), .fd_rem(fd_rem),
    .rm_a(rm_a), .rm_d(rm_d), .rm_b(rm_b), .rm_p(rm_p), .rm_s(rm_s)
  );

  always #5 clk = ~clk;

  typedef struct {
    op_e op;
    int  qr;
    int  s;
    int  due;
  } exp_t;
  exp_t expq[$];

  int checks = 0, failures = 0, cycle = 0;
  int n_op[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_full = 0;
  int n_md_mul = 0, n_md_div = 0, n_ss_sqr = 0, n_ss_sqrt = 0;
  int n_restore = 0, n_subtract = 0, n_pending = 0;
  op_e last_op = OP_MUL;
  logic last_valid = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isqrt(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic exp_t model(op_e o, int ia, int ib, int ip);
    exp_t e;
    e.op = o;
    e.qr = 0;
    case (o)
      OP_MUL:  e.s = (ia + ib * ip) % 256;
      OP_DIV:  begin e.qr = ia / ib; e.s = ia % ib; end
      OP_SQR:  e.s = (ia + ip * ip) % 256;
      default: begin e.qr = isqrt(ia); e.s = ia - e.qr * e.qr; end
    endcase
    return e;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // pipelined array: results against the queue of expected values
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && expq.size() >= LAT) n_full++;
    if (rst_n && out_valid) begin
      exp_t e;
      if (expq.size() == 0) check(1'b0, "unexpected pipeline result");
      else begin
        e = expq.pop_front();
        check(out_op == e.op && int'(s) == e.s && (!op_x(e.op) || int'(qr) == e.qr) && cycle == e.due,
              $sformatf("pipeline %s s=%0d qr=%0d exp s=%0d qr=%0d", e.op.name(), s, qr, e.s, e.qr));
      end
    end
  end

  // combinational arrays: checked just before the next stimulus
  task automatic check_comb();
    int ia, ib, ip, id;
    if (md_x) begin
      check(int'(md_q) == int'(md_a) / int'(md_b) && int'(md_s[3:0]) == int'(md_a) % int'(md_b), "md divide");
      n_md_div++;
    end else begin
      check(int'(md_s) == (int'(md_a) + int'(md_b) * int'(md_p)) % 256, "md multiply");
      n_md_mul++;
    end
    if (ss_x) begin
      check(int'(ss_r) == isqrt(int'(ss_a)) && int'(ss_s) == int'(ss_a) - int'(ss_r) * int'(ss_r), "ss root");
      n_ss_sqrt++;
    end else begin
      check(int'(ss_s) == (int'(ss_a) + int'(ss_f) * int'(ss_f)) % 256, "ss square");
      n_ss_sqr++;
    end
    check(int'(rd_q) == int'(rd_a) / int'(rd_b) && int'(rd_rem) == int'(rd_a) % int'(rd_b), "restoring divider");
    check(int'(fd_q) == int'(fd_a) / int'(fd_b) && int'(fd_rem) == int'(fd_a) % int'(fd_b), "fast divider");
    check(int'(rm_s) == int'(rm_a) + int'(rm_d) + int'(rm_b) * int'(rm_p), "rs multiplier");
    for (int j = 0; j < N; j++) begin
      if (rd_q[j]) n_subtract++;
      else n_restore++;
    end
    // a carry out of a row's sign look-ahead leaves an overflow pending
    if (dut.u_rd.g_row[0].c_cla | dut.u_rd.g_row[1].c_cla |
        dut.u_rd.g_row[2].c_cla | dut.u_rd.g_row[3].c_cla) n_pending++;
  endtask

  task automatic drive_comb();
    int ib;
    md_x = 1'($urandom_range(0, 1));
    md_b = 4'($urandom_range(1, 15));
    md_p = 4'($urandom_range(0, 15));
    md_a = md_x ? 7'(int'($urandom_range(0, int'(md_b) * 16 - 1)) % 128) : 7'($urandom_range(0, 30));
    ss_x = 1'($urandom_range(0, 1));
    ss_a = ss_x ? 8'($urandom_range(0, 255)) : 8'($urandom_range(0, 30));
    ss_f = 4'($urandom_range(0, 15));
    ib = int'($urandom_range(1, 15));
    rd_b = 4'(ib);
    rd_a = 7'(int'($urandom_range(0, ib * 16 - 1)) % 128);
    ib = int'($urandom_range(1, 15));
    fd_b = 4'(ib);
    fd_a = 7'(int'($urandom_range(0, ib * 16 - 1)) % 128);
    {rm_a, rm_d, rm_b, rm_p} = 16'($urandom);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n > 0) check_comb();
      drive_comb();
      if ($urandom_range(0, 9) == 0 && n > 50) begin
        in_valid = 1'b0;
        last_valid = 1'b0;
      end else begin
        int ia, ib, ip;
        exp_t e;
        op = op_e'($urandom_range(0, 3));
        ib = int'($urandom_range(1, 15));
        ip = int'($urandom_range(0, 15));
        case (op)
          OP_MUL, OP_SQR: ia = ($urandom_range(0, 1) == 0) ? 0 : int'($urandom_range(0, 40));
          OP_DIV:         ia = int'($urandom_range(0, ib * 16 - 1)) % 128;
          default:        ia = int'($urandom_range(0, 255));
        endcase
        a = 8'(ia); b = 4'(ib); pf = 4'(ip);
        in_valid = 1'b1;
        e = model(op, ia, ib, ip);
        e.due = cycle + LAT;
        expq.push_back(e);
        n_op[int'(op)]++;
        if (last_valid && op != last_op) n_switch++;
        last_op = op;
        last_valid = 1'b1;
      end
    end
    @(negedge clk);
    check_comb();
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    #1;
    check(expq.size() == 0, "results missing from the pipeline");
    $display("pipeline: mul=%0d div=%0d square=%0d sqrt=%0d op_switches=%0d full_cycles=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_switch, n_full);
    $display("arrays: md_mul=%0d md_div=%0d ss_square=%0d ss_root=%0d restore_rows=%0d subtract_rows=%0d pending_overflow=%0d",
             n_md_mul, n_md_div, n_ss_sqr, n_ss_sqrt, n_restore, n_subtract, n_pending);
    for (int i = 0; i < 4; i++) check(n_op[i] > 0, "an operation never ran in the pipeline");
    check(n_switch > 0, "operation never changed back to back");
    check(n_full > 0, "pipeline never full");
    check(n_md_mul > 0 && n_md_div > 0, "a multiplier-divider mode never ran");
    check(n_ss_sqr > 0 && n_ss_sqrt > 0, "a square/root mode never ran");
    check(n_restore > 0 && n_subtract > 0, "restore or subtract never happened");
    check(n_pending > 0, "no pending carry-save overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
