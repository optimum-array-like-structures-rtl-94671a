// Self-checking testbench for muldiv_array: every 4x4 product with a = 0 and
// random addends (x = 0), and every valid 7-by-4-bit division (x = 1),
// against integer arithmetic. Inputs change every 1 time unit.
// A second copy built with PIPELINED = 1 then gets a random mix of
// multiplications and divisions, a new operand set on every clock, and each
// result must appear exactly N+1 rising edges after its operands.
module tb_muldiv_array;
  localparam int N = 4;
  logic x;
  logic [2*N-2:0] a;
  logic [N-1:0] b, p, q;
  logic [2*N-1:0] s;
  int checks = 0, failures = 0;
  int n_mul = 0, n_div = 0;

  localparam int LAT = N + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic px = 1'b0;
  logic [2*N-2:0] pa = '0;
  logic [N-1:0] pb = '0, pp = '0, pq;
  logic [2*N-1:0] ps;
  typedef struct {
    bit x;
    int q;
    int s;
    int due;
  } exp_t;
  exp_t expq[$];
  int cycle = 0, n_pipe = 0, n_pipe_switch = 0;
  bit piping = 1'b0;

  muldiv_array #(.N(N), .PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .x(px), .a(pa), .b(pb), .p(pp), .q(pq), .s(ps)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (expq.size() != 0 && expq[0].due == cycle) begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      n_pipe++;
      if ((e.x ? int'(ps[N-1:0]) : int'(ps)) != e.s || (e.x && int'(pq) != e.q)) begin
        failures++;
        if (failures < 10)
          $display("FAIL pipelined cycle %0d x=%0d q=%0d s=%0d, expected q=%0d s=%0d",
                   cycle, e.x, pq, ps, e.q, e.s);
      end
    end
  end

  muldiv_array #(.N(N)) dut (.clk(1'b0), .rst_n(1'b1), .x(x), .a(a), .b(b), .p(p), .q(q), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d a=%0d b=%0d p=%0d q=%0d s=%0d", what, x, a, b, p, q, s);
    end
  endtask

  initial begin
    x = 1'b0;
    for (int ib = 0; ib < 16; ib++)
      for (int ip = 0; ip < 16; ip++) begin
        int ia;
        ia = (ib + ip) % 2 == 0 ? 0 : int'($urandom_range(0, 30));
        a = 7'(ia); b = 4'(ib); p = 4'(ip);
        #1;
        check(int'(s) == ((ia + ib * ip) & 255), "mul");
        n_mul++;
      end
    x = 1'b1;
    p = '0;
    for (int ib = 1; ib < 16; ib++)
      for (int ia = 0; ia < ib * 16 && ia < 128; ia++) begin
        a = 7'(ia); b = 4'(ib);
        #1;
        check(int'(q) == ia / ib && int'(s[N-1:0]) == ia % ib, "div");
        n_div++;
      end
    // pipelined copy
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      int ia, ib, ip;
      bit nx_x;
      @(negedge clk);
      nx_x = 1'($urandom_range(0, 1));
      if (n > 0 && nx_x != px) n_pipe_switch++;
      px = nx_x;
      e.x = px;
      if (px) begin
        ib = int'($urandom_range(1, 15));
        ia = int'($urandom_range(0, ib * 16 - 1)) % 128;
        ip = int'($urandom_range(0, 15));
        e.q = ia / ib;
        e.s = ia % ib;
      end else begin
        ib = int'($urandom_range(0, 15));
        ip = int'($urandom_range(0, 15));
        ia = int'($urandom_range(0, 1)) == 1 ? int'($urandom_range(0, 127)) : 0;
        e.q = 0;
        e.s = (ia + ib * ip) & 255;
      end
      pa = 7'(ia); pb = 4'(ib); pp = 4'(ip);
      e.due = cycle + LAT;
      expq.push_back(e);
    end
    repeat (LAT + 2) @(posedge clk);
    #1;
    checks++;
    if (expq.size() != 0 || n_pipe < 2000 || n_pipe_switch == 0) begin
      failures++;
      $display("FAIL pipelined: %0d results missing, %0d checked, %0d switches",
               expq.size(), n_pipe, n_pipe_switch);
    end
    $display("multiplications=%0d divisions=%0d pipelined=%0d x_switches=%0d",
             n_mul, n_div, n_pipe, n_pipe_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
