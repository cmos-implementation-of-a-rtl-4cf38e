// Exhaustive test of the TAIL cell over all 512 input combinations.
// Reference: the digit m added at this position is 0 (q = 0), the digit of
// Y or 2Y (adding), its complement 3 - d (subtracting) or 3 (minus zero);
// m + r_in must equal 4*c4 + s_p - 2*s_m2.
module tb_hr4_tail;
  import hr4_pkg::*;
  logic [1:0] y;
  logic y_nxt2, add, u1, u2, s_p, s_m2, c4;
  sd_digit_t r_in;
  int checks = 0, failures = 0;
  int d, m, rv;
  hr4_tail dut (.y(y), .y_nxt2(y_nxt2), .add(add), .u1(u1), .u2(u2), .r_in(r_in),
                .s_p(s_p), .s_m2(s_m2), .c4(c4));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      {y, y_nxt2, add, u1, u2, r_in} = 9'(v); #1;
      // digit of the multiple: Y digit, or (2*y mod 4) + high bit of next digit
      d = u1 ? ((2 * int'(y)) % 4 + int'(y_nxt2)) : int'(y);
      case ({add, u2})
        2'b00: m = 0;
        2'b01: m = 3 - d;
        2'b10: m = d;
        default: m = 3;
      endcase
      rv = int'(r_in.p) + int'(r_in.pp) - 2 * int'(r_in.m2);
      checks++;
      if (m + rv != 4 * int'(c4) + int'(s_p) - 2 * int'(s_m2)) begin
        failures++; $display("FAIL v=%b m=%0d r=%0d s_p=%0d s_m2=%0d c4=%0d", 9'(v), m, rv, s_p, s_m2, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
