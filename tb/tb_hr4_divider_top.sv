// End-to-end test of the divider at its default size (N = 9: 16-bit
// dividend, 17-bit divisor mantissa, 8 radix-4 quotient digits).
// For directed operands, every divisor mantissa and random operands it checks, in units u = 4^-(N-1):
//   K*X * 4^(N-1) = Q * K*Y + R   exactly (the array's identity),
//   |Q - X/Y| <= 3 u               (accuracy after range reduction),
// and counts how often each mechanism occurs: every quotient digit value
// and minus zero, every range-reduction constant (including the one with a
// subtracted term), negative dividends and negative final remainders. A
// mechanism that never occurs counts as a failure.
module tb_hr4_divider_top;
  import hr4_pkg::*;
  localparam int N = 9;
  localparam int WX = 2 * N - 2;
  logic [WX-1:0] x, xs;
  logic [WX:0] y, ys;
  qdigit_t [N-1:1] q_dig;
  logic [2*N-2:0] quo;
  sd_digit_t [N-1:1] rem;
  int checks = 0, failures = 0;
  int dig_seen [0:5];
  int k_seen [0:15];
  int neg_x = 0, neg_r = 0, qv;
  longint p, xv, yv, xsv, ysv, qo, rv, d;

  hr4_divider_top dut (.x(x), .y(y), .q_dig(q_dig), .quo(quo), .rem(rem), .xs(xs), .ys(ys));

  task automatic check_one();
    #1;
    xv = longint'($signed(x)); yv = longint'(y);
    xsv = longint'($signed(xs)); ysv = longint'(ys);
    qo = longint'($signed(quo));
    rv = 0;
    for (int i = 1; i <= N - 1; i++) begin
      rv = rv * 4 + longint'(rem[i].p) + longint'(rem[i].pp) - 2 * longint'(rem[i].m2);
      if (!q_dig[i].u2) qv = q_dig[i].add ? (q_dig[i].u1 ? -2 : -1) : 0;
      else              qv = q_dig[i].add ? 0 : (q_dig[i].u1 ? 2 : 1);
      dig_seen[(q_dig[i].add & q_dig[i].u2) ? 5 : qv + 2]++;
    end
    k_seen[y[WX-1 -: 4]]++;
    if (xv < 0) neg_x++;
    if (rv < 0) neg_r++;
    checks += 2;
    if (xsv * p != qo * ysv + rv) begin
      failures++; $display("FAIL identity x=%0d y=%0d Q=%0d R=%0d", xv, yv, qo, rv);
    end
    d = qo * yv - xv * p;
    if (d > 3 * yv || d < -3 * yv) begin
      failures++; $display("FAIL accuracy x=%0d y=%0d Q=%0d", xv, yv, qo);
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    p = longint'(1) <<< WX;
    foreach (dig_seen[k]) dig_seen[k] = 0;
    foreach (k_seen[k]) k_seen[k] = 0;
    // directed corners: extreme dividends against extreme divisors
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 4; b++) begin
        case (a)
          0: x = {1'b1, {(WX-1){1'b0}}};   // -1/2
          1: x = {1'b0, {(WX-1){1'b1}}};   // just below +1/2
          2: x = '0;
          3: x = '1;                       // -1 unit
          default: x = WX'(1);
        endcase
        case (b)
          0: y = {1'b1, {WX{1'b0}}};       // 1
          1: y = '1;                        // just below 2
          2: y = {1'b1, 4'd2, {(WX-4){1'b0}}};
          default: y = {1'b1, 4'd2, {(WX-4){1'b1}}};
        endcase
        check_one();
      end
    // every divisor mantissa once, each with a random dividend
    for (int t = 0; t < (1 << WX); t++) begin
      x = WX'($urandom);
      y = {1'b1, WX'(t)};
      check_one();
    end
    for (int t = 0; t < 30000; t++) begin
      x = WX'($urandom);
      y = {1'b1, WX'($urandom)};
      check_one();
    end
    for (int k = 0; k <= 5; k++) begin
      checks++;
      if (dig_seen[k] == 0) begin failures++; $display("FAIL digit class %0d never occurred", k); end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (k_seen[k] == 0) begin failures++; $display("FAIL scaling constant %0d never used", k); end
    end
    checks += 2;
    if (neg_x == 0) begin failures++; $display("FAIL no negative dividend"); end
    if (neg_r == 0) begin failures++; $display("FAIL no negative remainder"); end
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d minus-zero:%0d; subtracted-term constant used %0d times; negative dividends %0d; negative remainders %0d",
             dig_seen[0], dig_seen[1], dig_seen[2], dig_seen[3], dig_seen[4], dig_seen[5], k_seen[2], neg_x, neg_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
