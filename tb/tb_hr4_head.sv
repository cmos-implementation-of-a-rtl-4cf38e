// Exhaustive test of the HEAD cell: for every encoding of r1, r2 the new
// digit bits must satisfy s_p - 2*s_m2 = 4*(r1 - q) + r2 - u2, where q is
// the selected digit, and that value must lie in -2..1.
module tb_hr4_head;
  import hr4_pkg::*;
  sd_digit_t r1, r2;
  qdigit_t q;
  logic s_p, s_m2;
  int checks = 0, failures = 0;
  int v1, v2, qv, want, got;
  hr4_head dut (.r1(r1), .r2(r2), .q(q), .s_p(s_p), .s_m2(s_m2));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 64; v++) begin
      {r1, r2} = 6'(v); #1;
      v1 = int'(r1.p) + int'(r1.pp) - 2 * int'(r1.m2);
      v2 = int'(r2.p) + int'(r2.pp) - 2 * int'(r2.m2);
      if (!q.u2) qv = q.add ? (q.u1 ? -2 : -1) : 0;
      else       qv = q.add ? 0 : (q.u1 ? 2 : 1);
      want = 4 * (v1 - qv) + v2 - int'(q.u2);
      got  = int'(s_p) - 2 * int'(s_m2);
      checks++;
      if (want != got || want < -2 || want > 1) begin
        failures++; $display("FAIL r1=%0d r2=%0d q=%0d want=%0d got=%0d", v1, v2, qv, want, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
