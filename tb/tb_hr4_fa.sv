// Exhaustive test of the full adder: a+b+c must equal 2*co+s.
module tb_hr4_fa;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;
  hr4_fa dut (.a(a), .b(b), .c(c), .s(s), .co(co));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v); #1;
      checks++;
      if (int'(a) + int'(b) + int'(c) != 2 * int'(co) + int'(s)) begin
        failures++; $display("FAIL a=%0d b=%0d c=%0d s=%0d co=%0d", a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
