// Self-checking testbench for mod_div_cell: all 128 input combinations. The
// pair chosen by q_prev is added to b (added outputs) and on its own
// (transfer outputs) with integer arithmetic.
module tb_mod_div_cell;
  logic q_prev, a, a_t, c, c_t, b, e_in;
  logic s, s_t, c_out, c_t_out, e_out, g, p;
  int checks = 0, failures = 0;

  mod_div_cell dut (.q_prev(q_prev), .a(a), .a_t(a_t), .c(c), .c_t(c_t), .b(b), .e_in(e_in),
                    .s(s), .s_t(s_t), .c_out(c_out), .c_t_out(c_t_out), .e_out(e_out),
                    .g(g), .p(p));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int xa, xc, added, trans;
      {q_prev, a, a_t, c, c_t, b, e_in} = 7'(v);
      #1;
      xa = q_prev ? int'(a) : int'(a_t);
      xc = q_prev ? int'(c) : int'(c_t);
      added = xa + xc + int'(b);
      trans = xa + xc;
      checks++;
      if ({c_out, s} != 2'(added) || {c_t_out, s_t} != 2'(trans) || e_out != c_out ||
          g != (s & e_in) || p != (s | e_in)) begin
        failures++;
        $display("FAIL v=%07b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
