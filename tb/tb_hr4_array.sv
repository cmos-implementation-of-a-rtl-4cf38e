// Random test of the divider array at N = 9 (8 quotient digits). For random
// signed-digit dividends and divisors 1 <= Y < 9/8, with all quantities as
// integers in units of 4^-(N-1):
//   X * 4^(N-1) = Q * Y + R      (R the final remainder)
// must hold exactly, Q must equal the sum of the quotient digits, and
// |R| <= (2/3) * 4^(N-1).
module tb_hr4_array;
  import hr4_pkg::*;
  localparam int N = 9;
  sd_digit_t [N-1:1] x, rem;
  logic [N-1:2][1:0] y;
  qdigit_t [N-1:1] q;
  logic [2*N-2:0] quo;
  int checks = 0, failures = 0;
  longint xv, yv, rv, qs, qo, p;
  int qv;
  hr4_array #(.N(N)) dut (.x(x), .y(y), .q(q), .quo(quo), .rem(rem));

  function automatic longint dig(sd_digit_t d);
    return longint'(d.p) + longint'(d.pp) - 2 * longint'(d.m2);
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    p = 1;
    for (int i = 1; i <= N - 1; i++) p = p * 4;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 1; i <= N - 1; i++) x[i] = 3'($urandom);
      for (int i = 2; i <= N - 1; i++) y[i] = 2'($urandom);
      y[2][1] = 1'b0;
      #1;
      xv = 0; rv = 0; yv = 1; qs = 0;
      for (int i = 1; i <= N - 1; i++) begin
        xv = xv * 4 + dig(x[i]);
        rv = rv * 4 + dig(rem[i]);
        yv = yv * 4 + ((i == 1) ? 0 : longint'(y[i]));
        if (!q[i].u2) qv = q[i].add ? (q[i].u1 ? -2 : -1) : 0;
        else          qv = q[i].add ? 0 : (q[i].u1 ? 2 : 1);
        qs = qs * 4 + qv;
      end
      qo = longint'($signed(quo));
      checks += 3;
      if (xv * p != qo * yv + rv) begin
        failures++; $display("FAIL X=%0d Y=%0d Q=%0d R=%0d", xv, yv, qo, rv);
      end
      if (qo != qs) begin
        failures++; $display("FAIL converted Q=%0d digit sum=%0d", qo, qs);
      end
      if (3 * rv > 2 * p || 3 * rv < -2 * p) begin
        failures++; $display("FAIL remainder out of range R=%0d", rv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
