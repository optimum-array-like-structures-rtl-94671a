// Self-checking testbench for sign_lookahead (K = 8): the carry out is
// compared with a rippled carry c(i+1) = g(i) | p(i) & c(i), exhaustively
// over all generate/propagate patterns that can occur (g implies p) and
// both carry-in values.
module tb_sign_lookahead;
  localparam int K = 8;
  logic [K-1:0] g, p;
  logic cin, cout;
  int checks = 0, failures = 0;

  sign_lookahead #(.K(K)) dut (.g(g), .p(p), .cin(cin), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vg = 0; vg < (1 << K); vg++)
      for (int vp = 0; vp < (1 << K); vp++)
        for (int ci = 0; ci < 2; ci++) begin
          logic rc;
          if ((vg & ~vp) != 0) continue;
          g = K'(vg); p = K'(vp); cin = ci[0];
          #1;
          rc = cin;
          for (int i = 0; i < K; i++) rc = g[i] | (p[i] & rc);
          checks++;
          if (cout != rc) begin
            failures++;
            if (failures < 10) $display("FAIL g=%b p=%b cin=%b cout=%b", g, p, cin, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
