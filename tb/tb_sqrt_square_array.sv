// Self-checking testbench for sqrt_square_array: the root and remainder of
// every 8-bit radicand (x = 1) and the square of every 4-bit f with a = 0
// plus some with a small addend (x = 0), against integer arithmetic. Inputs
// change every 1 time unit. A second copy built with PIPELINED = 1 then gets
// a random mix of square roots and squares, a new operand set on every
// clock, and each result must appear exactly N+1 rising edges later.
module tb_sqrt_square_array;
  localparam int N = 4;
  logic x;
  logic [2*N-1:0] a, s;
  logic [N-1:0] f, r;
  int checks = 0, failures = 0;

  localparam int LAT = N + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic px = 1'b0;
  logic [2*N-1:0] pa = '0, ps;
  logic [N-1:0] pf = '0, pr;
  typedef struct {
    bit x;
    int r;
    int s;
    int due;
  } exp_t;
  exp_t expq[$];
  int cycle = 0, n_pipe = 0, n_pipe_switch = 0;

  sqrt_square_array #(.N(N), .PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .x(px), .a(pa), .f(pf), .r(pr), .s(ps)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (expq.size() != 0 && expq[0].due == cycle) begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      n_pipe++;
      if (int'(ps) != e.s || (e.x && int'(pr) != e.r)) begin
        failures++;
        if (failures < 10)
          $display("FAIL pipelined cycle %0d x=%0d r=%0d s=%0d, expected r=%0d s=%0d",
                   cycle, e.x, pr, ps, e.r, e.s);
      end
    end
  end

  sqrt_square_array #(.N(N)) dut (.clk(1'b0), .rst_n(1'b1), .x(x), .a(a), .f(f), .r(r), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    // pipelined copy
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      int ia, ip;
      bit nx_x;
      @(negedge clk);
      nx_x = 1'($urandom_range(0, 1));
      if (n > 0 && nx_x != px) n_pipe_switch++;
      px = nx_x;
      e.x = px;
      ip = int'($urandom_range(0, 15));
      if (px) begin
        int rr;
        ia = int'($urandom_range(0, 255));
        rr = 0;
        while ((rr + 1) * (rr + 1) <= ia) rr++;
        e.r = rr;
        e.s = ia - rr * rr;
      end else begin
        ia = int'($urandom_range(0, 1)) == 1 ? int'($urandom_range(0, 255)) : 0;
        e.r = 0;
        e.s = (ia + ip * ip) & 255;
      end
      pa = 8'(ia); pf = 4'(ip);
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
    $display("pipelined=%0d x_switches=%0d", n_pipe, n_pipe_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d a=%0d f=%0d r=%0d s=%0d", what, x, a, f, r, s);
    end
  endtask

  initial begin
    x = 1'b1;
    f = '0;
    for (int ia = 0; ia < 256; ia++) begin
      int rr;
      rr = 0;
      while ((rr + 1) * (rr + 1) <= ia) rr++;
      a = 8'(ia);
      #1;
      check(int'(r) == rr && int'(s) == ia - rr * rr, "sqrt");
    end
    x = 1'b0;
    for (int i_f = 0; i_f < 16; i_f++)
      for (int ia = 0; ia < 3; ia++) begin
        a = 8'(ia * 10);
        f = 4'(i_f);
        #1;
        check(int'(s) == ((ia * 10 + i_f * i_f) & 255), "square");
      end
    // pipelined copy
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      int ia, ip;
      bit nx_x;
      @(negedge clk);
      nx_x = 1'($urandom_range(0, 1));
      if (n > 0 && nx_x != px) n_pipe_switch++;
      px = nx_x;
      e.x = px;
      ip = int'($urandom_range(0, 15));
      if (px) begin
        int rr;
        ia = int'($urandom_range(0, 255));
        rr = 0;
        while ((rr + 1) * (rr + 1) <= ia) rr++;
        e.r = rr;
        e.s = ia - rr * rr;
      end else begin
        ia = int'($urandom_range(0, 1)) == 1 ? int'($urandom_range(0, 255)) : 0;
        e.r = 0;
        e.s = (ia + ip * ip) & 255;
      end
      pa = 8'(ia); pf = 4'(ip);
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
    $display("pipelined=%0d x_switches=%0d", n_pipe, n_pipe_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
