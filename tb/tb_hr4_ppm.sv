// Exhaustive test of the PPM cell: 2a - 2b + 2c must equal 4*o4 - 2*o2.
module tb_hr4_ppm;
  logic a, b, c, o4, o2;
  int checks = 0, failures = 0;
  hr4_ppm dut (.a(a), .b(b), .c(c), .o4(o4), .o2(o2));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v); #1;
      checks++;
      if (2 * int'(a) - 2 * int'(b) + 2 * int'(c) != 4 * int'(o4) - 2 * int'(o2)) begin
        failures++; $display("FAIL a=%0d b=%0d c=%0d o4=%0d o2=%0d", a, b, c, o4, o2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
