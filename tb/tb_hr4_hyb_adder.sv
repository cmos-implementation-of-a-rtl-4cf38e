// Exhaustive test of the hybrid radix-4 adder of one digit position:
// 2*my2 + my1 + r must equal 4*c4 + s_p - 2*s_m2 for all 32 input codes.
module tb_hr4_hyb_adder;
  import hr4_pkg::*;
  logic my2, my1, s_p, s_m2, c4;
  sd_digit_t r;
  int checks = 0, failures = 0;
  hr4_hyb_adder dut (.my2(my2), .my1(my1), .r(r), .s_p(s_p), .s_m2(s_m2), .c4(c4));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      {my2, my1, r} = 5'(v); #1;
      checks++;
      if (2 * int'(my2) + int'(my1) + int'(r.p) + int'(r.pp) - 2 * int'(r.m2)
          != 4 * int'(c4) + int'(s_p) - 2 * int'(s_m2)) begin
        failures++; $display("FAIL v=%b s_p=%0d s_m2=%0d c4=%0d", 5'(v), s_p, s_m2, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
