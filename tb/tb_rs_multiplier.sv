// Self-checking testbench for rs_multiplier: exhaustive over all 4-bit a, d,
// b and p, comparing s with the integer a + b*p + d.
module tb_rs_multiplier;
  localparam int N = 4;
  logic [N-1:0] a, d, b, p;
  logic [2*N-1:0] s;
  int checks = 0, failures = 0;

  rs_multiplier #(.N(N)) dut (.a(a), .d(d), .b(b), .p(p), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++)
      for (int id = 0; id < 16; id++)
        for (int ib = 0; ib < 16; ib++)
          for (int ip = 0; ip < 16; ip++) begin
            a = N'(ia); d = N'(id); b = N'(ib); p = N'(ip);
            #1;
            checks++;
            if (int'(s) != ia + id + ib * ip) begin
              failures++;
              if (failures < 10) $display("FAIL a=%0d d=%0d b=%0d p=%0d s=%0d", ia, id, ib, ip, s);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
