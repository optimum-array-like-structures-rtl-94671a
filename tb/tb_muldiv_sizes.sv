// Self-checking testbench running muldiv_array at every word length from 2
// to 8 bits side by side. Each instance gets random multiplications (x = 0,
// a = 0) and random valid divisions (x = 1), checked against integer
// arithmetic. The larger sizes are the word lengths over which the
// multiplier-divider's cost is usually compared. Beside each combinational
// instance runs a pipelined one (PIPELINED = 1) fed the same operands, one
// set per clock pulse; the result of each set must appear after exactly N+1
// pulses. Each step takes 2 time units: inputs change, the combinational
// result is checked 1 unit later, then the clock rises.
module tb_muldiv_sizes;
  int checks = 0, failures = 0;
  int done = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 2; n <= 8; n++) begin : g_size
    logic           x;
    logic [2*n-2:0] a;
    logic [n-1:0]   b, p, q;
    logic [2*n-1:0] s, s_p;
    logic [n-1:0]   q_p;
    logic           clk = 1'b0, rst_n = 1'b0;
    int             exp_q[2000], exp_s[2000];
    bit             exp_x[2000];

    muldiv_array #(.N(n)) dut (.clk(1'b0), .rst_n(1'b1), .x(x), .a(a), .b(b), .p(p), .q(q), .s(s));
    muldiv_array #(.N(n), .PIPELINED(1'b1)) dut_p (
      .clk(clk), .rst_n(rst_n), .x(x), .a(a), .b(b), .p(p), .q(q_p), .s(s_p)
    );

    initial begin
      clk = 1'b1;
      #1;
      clk = 1'b0;
      rst_n = 1'b1;
      for (int k = 0; k < 2000; k++) begin
        int ia, ib, ip;
        ib = int'($urandom_range(1, (1 << n) - 1));
        ip = int'($urandom_range(0, (1 << n) - 1));
        x  = 1'(k % 2);
        if (x) ia = int'($urandom_range(0, ib * (1 << n) - 1)) % (1 << (2 * n - 1));
        else   ia = 0;
        a = (2*n-1)'(ia); b = n'(ib); p = n'(ip);
        #1;
        checks++;
        if (x ? (int'(q) != ia / ib || int'(s[n-1:0]) != ia % ib) : (int'(s) != ib * ip)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d x=%0d a=%0d b=%0d p=%0d q=%0d s=%0d", n, x, ia, ib, ip, q, s);
        end
        exp_x[k] = x;
        exp_q[k] = x ? ia / ib : 0;
        exp_s[k] = x ? ia % ib : ib * ip;
        clk = 1'b1;
        #1;
        clk = 1'b0;
        if (k >= n) begin
          checks++;
          if (exp_x[k-n] ? (int'(q_p) != exp_q[k-n] || int'(s_p[n-1:0]) != exp_s[k-n])
                         : (int'(s_p) != exp_s[k-n])) begin
            failures++;
            if (failures < 10) $display("FAIL pipelined n=%0d step %0d q=%0d s=%0d", n, k - n, q_p, s_p);
          end
        end
      end
      done++;
      if (done == 7) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
