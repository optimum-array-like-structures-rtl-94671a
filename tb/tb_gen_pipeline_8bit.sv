// Self-checking testbench for gen_pipeline_array at 8-bit word length
// (N = 8: 16-bit dividends and radicands, 8-bit divisors, roots and
// multiplier operands), the larger size of the generalized array.
//
// Feeds a new operand set on most clock cycles, mixing the four operations
// at random (with idle gaps), and keeps a queue of expected results computed
// with integer arithmetic. Every result must appear exactly N+2 cycles after
// its operands were presented. Counts each operation, back-to-back changes
// of operation, and cycles with the pipeline completely full; each of these
// must occur.
module tb_gen_pipeline_8bit;
  import arith_pkg::*;
  localparam int N   = 8;
  localparam int LAT = N + 2;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  op_e  op = OP_MUL;
  logic [2*N-1:0] a = '0;
  logic [N-1:0] b = '0, pf = '0;
  logic out_valid;
  op_e  out_op;
  logic [N-1:0] qr;
  logic [2*N-1:0] s;

  typedef struct {
    op_e op;
    int  qr;
    int  s;
    int  due;
  } exp_t;
  exp_t expq[$];

  int checks = 0, failures = 0, cycle = 0;
  int n_op[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_full = 0, in_flight = 0;
  op_e last_op = OP_MUL;
  logic last_valid = 1'b0;

  gen_pipeline_array #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .a(a), .b(b), .pf(pf),
    .out_valid(out_valid), .out_op(out_op), .qr(qr), .s(s)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model(op_e o, int ia, int ib, int ip);
    exp_t e;
    e.op = o;
    e.qr = 0;
    case (o)
      OP_MUL:  e.s = (ia + ib * ip) % (1 << (2 * N));
      OP_DIV:  begin e.qr = ia / ib; e.s = ia % ib; end
      OP_SQR:  e.s = (ia + ip * ip) % (1 << (2 * N));
      default: begin
        int r = 0;
        while ((r + 1) * (r + 1) <= ia) r++;
        e.qr = r;
        e.s  = ia - r * r;
      end
    endcase
    return e;
  endfunction

  // checker: compare outputs on each rising edge before new inputs apply
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (out_op != e.op || int'(s) != e.s || (op_x(e.op) && int'(qr) != e.qr) || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d op=%s s=%0d qr=%0d, expected op=%s s=%0d qr=%0d due %0d",
                     cycle, out_op.name(), s, qr, e.op.name(), e.s, e.qr, e.due);
        end
      end
    end
  end

  // count complete pipeline occupancy
  always @(posedge clk) begin
    if (rst_n && expq.size() >= LAT) n_full++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0 && n > 50) begin
        in_valid = 1'b0;
        last_valid = 1'b0;
      end else begin
        int ia, ib, ip;
        exp_t e;
        op = op_e'($urandom_range(0, 3));
        ib = int'($urandom_range(1, (1 << N) - 1));
        ip = int'($urandom_range(0, (1 << N) - 1));
        case (op)
          OP_MUL, OP_SQR: ia = ($urandom_range(0, 1) == 0) ? 0 : int'($urandom_range(0, 40));
          OP_DIV:         ia = int'($urandom_range(0, ib * (1 << N) - 1)) % (1 << (2 * N - 1));
          default:        ia = int'($urandom_range(0, (1 << (2 * N)) - 1));
        endcase
        a = (2*N)'(ia); b = N'(ib); pf = N'(ip);
        in_valid = 1'b1;
        e = model(op, ia, ib, ip);
        // captured at the next edge (cycle value k+... ) and due LAT edges later
        e.due = cycle + LAT;
        expq.push_back(e);
        n_op[int'(op)]++;
        if (last_valid && op != last_op) n_switch++;
        last_op = op;
        last_valid = 1'b1;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    #1;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", expq.size());
    end
    $display("mul=%0d div=%0d square=%0d sqrt=%0d op_switches=%0d full_pipeline_cycles=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_switch, n_full);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_op[i] == 0) failures++;
    end
    checks++;
    if (n_switch == 0) failures++;
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
