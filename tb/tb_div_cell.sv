// Self-checking testbench for div_cell: all 32 input combinations. The
// gated sum/carry are checked against the integer a + c + q*b, the expected
// carry against a + b + c, and g/p against the generate and inclusive
// propagate of the pair (sum bit of a+b+c, e_in).
module tb_div_cell;
  logic a, b, c, e_in, q, s, c_out, e_out, g, p, bo, qo;
  int checks = 0, failures = 0;

  div_cell dut (.a(a), .b(b), .c(c), .e_in(e_in), .q(q), .s(s), .c_out(c_out),
                .e_out(e_out), .g(g), .p(p), .bo(bo), .qo(qo));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int gated, full, hsum;
      {a, b, c, e_in, q} = 5'(v);
      #1;
      gated = int'(a) + int'(c) + int'(q) * int'(b);
      full  = int'(a) + int'(b) + int'(c);
      hsum  = full % 2;
      checks++;
      if ({c_out, s} != 2'(gated) || e_out != (full >= 2) ||
          g != (hsum + int'(e_in) == 2) || p != (hsum + int'(e_in) >= 1) || bo != b || qo != q) begin
        failures++;
        $display("FAIL v=%05b s=%0b c=%0b e=%0b g=%0b p=%0b", v, s, c_out, e_out, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
