// Random test of one divider slice (N = 9): for random remainder digit codes
// and divisors 1 <= Y < 9/8 the output remainder must equal 4*R - q*Y
// exactly, with q the digit chosen from E = 4*r1 + r2 by the selection rule.
// Values are computed in units of 4^-(N-1). Every quotient digit value and
// minus zero must occur.
module tb_hr4_slice;
  import hr4_pkg::*;
  localparam int N = 9;
  sd_digit_t [N-1:1] r_in, r_out;
  logic [N-1:2][1:0] y;
  qdigit_t q;
  int checks = 0, failures = 0;
  longint rv, yv, ov;
  int qv, e, exp_q;
  int seen [0:5];
  hr4_slice #(.N(N)) dut (.r_in(r_in), .y(y), .q(q), .r_out(r_out));

  function automatic longint dig(sd_digit_t d);
    return longint'(d.p) + longint'(d.pp) - 2 * longint'(d.m2);
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 1; i <= N - 1; i++) r_in[i] = 3'($urandom);
      for (int i = 2; i <= N - 1; i++) y[i] = 2'($urandom);
      y[2][1] = 1'b0;
      #1;
      rv = 0; ov = 0; yv = 1;
      for (int i = 1; i <= N - 1; i++) begin
        rv = rv * 4 + dig(r_in[i]);
        ov = ov * 4 + dig(r_out[i]);
      end
      for (int i = 1; i <= N - 1; i++) yv = yv * 4 + ((i == 1) ? 0 : longint'(y[i]));
      if (!q.u2) qv = q.add ? (q.u1 ? -2 : -1) : 0;
      else       qv = q.add ? 0 : (q.u1 ? 2 : 1);
      e = 4 * int'(dig(r_in[1])) + int'(dig(r_in[2]));
      if (e <= -7) exp_q = -2;
      else if (e <= -3) exp_q = -1;
      else if (e <= 2) exp_q = 0;
      else if (e <= 6) exp_q = 1;
      else exp_q = 2;
      seen[(q.add & q.u2) ? 5 : qv + 2]++;
      checks += 2;
      if (ov != 4 * rv - longint'(qv) * yv) begin
        failures++; $display("FAIL R=%0d Y=%0d q=%0d out=%0d want=%0d", rv, yv, qv, ov, 4 * rv - qv * yv);
      end
      if (qv != exp_q) begin
        failures++; $display("FAIL E=%0d q=%0d expected %0d", e, qv, exp_q);
      end
    end
    for (int k = 0; k <= 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL digit class %0d never selected", k); end
    end
    $display("digit counts -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d minus-zero:%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
