// Self-checking testbench for restoring_divider: every divisor 1..15 with
// every dividend whose quotient fits in 4 bits, against integer / and %.
// Inputs change every 1 time unit; the outputs are read after they settle.
module tb_restoring_divider;
  localparam int N = 4;
  logic [2*N-2:0] a;
  logic [N-1:0] b, q, rem;
  int checks = 0, failures = 0;

  restoring_divider #(.N(N)) dut (.a(a), .b(b), .q(q), .rem(rem));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ib = 1; ib < (1 << N); ib++)
      for (int ia = 0; ia < ib * (1 << N) && ia < (1 << (2 * N - 1)); ia++) begin
        a = (2*N-1)'(ia); b = N'(ib);
        #1;
        checks++;
        if (int'(q) != ia / ib || int'(rem) != ia % ib) begin
          failures++;
          if (failures < 10) $display("FAIL %0d/%0d q=%0d rem=%0d", ia, ib, q, rem);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
