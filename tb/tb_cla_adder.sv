// Self-checking testbench for cla_adder: exhaustive at W = 8 and random at
// W = 9 (a partial last group), against the integer a + b + cin.
module tb_cla_adder;
  logic [7:0] a8, b8, s8;
  logic [8:0] a9, b9, s9;
  logic cin, co8, co9;
  int checks = 0, failures = 0;

  cla_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(co8));
  cla_adder #(.W(9)) dut9 (.a(a9), .b(b9), .cin(cin), .sum(s9), .cout(co9));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); cin = c[0];
          a9 = 9'($urandom_range(0, 511)); b9 = 9'($urandom_range(0, 511));
          #1;
          checks += 2;
          if ({co8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W8 %0d+%0d+%0d=%0d", i, j, c, {co8, s8});
          end
          if ({co9, s9} != 10'(int'(a9) + int'(b9) + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W9 %0d+%0d+%0d=%0d", a9, b9, c, {co9, s9});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
