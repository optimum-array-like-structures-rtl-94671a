// Self-checking testbench for sqrt_cell: all 128 input combinations. Sums
// and carries are checked with integer addition of the (x-complemented)
// subtrahend bit, the next subtrahend pair against the rewrite rule:
// equal (b,d) pass, (0,1) becomes (r,r), (1,0) becomes (0,1).
module tb_sqrt_cell;
  logic a, b, c, d, e_in, r, x;
  logic s, c_out, e_out, g, p, g_sub, h_sub;
  int checks = 0, failures = 0;

  sqrt_cell dut (.a(a), .b(b), .c(c), .d(d), .e_in(e_in), .r(r), .x(x),
                 .s(s), .c_out(c_out), .e_out(e_out), .g(g), .p(p), .g_sub(g_sub), .h_sub(h_sub));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int bx, gated, full, hsum;
      logic eg, eh;
      {a, b, c, d, e_in, r, x} = 7'(v);
      #1;
      bx    = (b != x) ? 1 : 0;
      gated = int'(a) + int'(c) + int'(r) * bx;
      full  = int'(a) + int'(c) + bx;
      hsum  = full % 2;
      case ({b, d})
        2'b00:   begin eg = 1'b0; eh = 1'b0; end
        2'b11:   begin eg = 1'b1; eh = 1'b1; end
        2'b01:   begin eg = r;    eh = r;    end
        default: begin eg = 1'b0; eh = 1'b1; end
      endcase
      checks++;
      if ({c_out, s} != 2'(gated) || e_out != (full >= 2) || g != (hsum + int'(e_in) == 2) ||
          p != (hsum + int'(e_in) >= 1) || g_sub != eg || h_sub != eh) begin
        failures++;
        $display("FAIL v=%07b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
