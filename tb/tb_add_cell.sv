// Self-checking testbench for add_cell: all 16 input combinations, checked
// against the integer sum a + c1 + b*p.
module tb_add_cell;
  logic a, b, c1, p, s, c2, bo, po;
  int checks = 0, failures = 0;

  add_cell dut (.a(a), .b(b), .c1(c1), .p(p), .s(s), .c2(c2), .bo(bo), .po(po));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int tot;
      {a, b, c1, p} = 4'(v);
      #1;
      tot = int'(a) + int'(c1) + int'(b) * int'(p);
      checks++;
      if ({c2, s} != 2'(tot) || bo != b || po != p) begin
        failures++;
        $display("FAIL a=%0b b=%0b c1=%0b p=%0b -> s=%0b c2=%0b", a, b, c1, p, s, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
