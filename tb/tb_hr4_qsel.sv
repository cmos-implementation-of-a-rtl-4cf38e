// Exhaustive test of the quotient selector over all 64 encodings of the two
// leading remainder digits. With E = 4*r1 + r2 the expected digit is
//   E <= -7: -2,  -6..-3: -1,  -2..1: 0,  2: minus zero,  3..6: +1,  7..10: +2
// and the leading digit left after the step, 4*(r1-q) + r2 - u2, must lie in
// -2..1 so that a carry from below keeps it within -2..2.
module tb_hr4_qsel;
  import hr4_pkg::*;
  sd_digit_t r1, r2;
  qdigit_t q;
  int checks = 0, failures = 0;
  int v1, v2, e, qv, exp_q, lead;
  bit exp_mz, mz;
  hr4_qsel dut (.r1(r1), .r2(r2), .q(q));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 64; v++) begin
      {r1, r2} = 6'(v); #1;
      v1 = int'(r1.p) + int'(r1.pp) - 2 * int'(r1.m2);
      v2 = int'(r2.p) + int'(r2.pp) - 2 * int'(r2.m2);
      e = 4 * v1 + v2;
      exp_mz = (e == 2);
      if (e <= -7) exp_q = -2;
      else if (e <= -3) exp_q = -1;
      else if (e <= 2) exp_q = 0;
      else if (e <= 6) exp_q = 1;
      else exp_q = 2;
      // decode the code by Table-2 rules
      mz = q.add & q.u2;
      if (!q.u2) qv = q.add ? (q.u1 ? -2 : -1) : 0;
      else       qv = q.add ? 0 : (q.u1 ? 2 : 1);
      lead = 4 * (v1 - qv) + v2 - int'(q.u2);
      checks += 2;
      if (qv != exp_q || mz != exp_mz) begin
        failures++; $display("FAIL r1=%0d r2=%0d q=%b expected %0d mz=%0d", v1, v2, q, exp_q, exp_mz);
      end
      if (lead < -2 || lead > 1) begin
        failures++; $display("FAIL r1=%0d r2=%0d leading digit %0d", v1, v2, lead);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
