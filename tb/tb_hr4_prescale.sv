// Random and directed test of the range reduction at N = 9.
// Reference: K in units of 1/32 per divisor index (four fraction bits of Y)
//   32 32 30 28 26 26 24 24 22 22 20 20 19 18 18 18
// and the outputs must be floor(K*y), floor(K*x), with 1 <= K*Y < 9/8; the
// dividend digits must add up to K*X and the divisor digits to K*Y.
module tb_hr4_prescale;
  import hr4_pkg::*;
  localparam int N = 9;
  localparam int WX = 2 * N - 2;
  logic [WX-1:0] x, xs;
  logic [WX:0] y, ys;
  sd_digit_t [N-1:1] x_sd;
  logic [N-1:2][1:0] y_dig;
  int checks = 0, failures = 0;
  int k32 [0:15] = '{32, 32, 30, 28, 26, 26, 24, 24, 22, 22, 20, 20, 19, 18, 18, 18};
  int seen [0:15];
  longint one, xv, yv, kx, ky, dsum, ysum;
  hr4_prescale #(.N(N)) dut (.x(x), .y(y), .xs(xs), .ys(ys), .x_sd(x_sd), .y_dig(y_dig));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    one = longint'(1) <<< WX;
    foreach (seen[k]) seen[k] = 0;
    for (int t = 0; t < 20000; t++) begin
      x = WX'($urandom);
      y = {1'b1, WX'($urandom)};
      if (t < 16) y = {1'b1, 4'(t), {(WX-4){1'b0}}};          // bottom of each interval
      else if (t < 32) y = {1'b1, 4'(t), {(WX-4){1'b1}}};     // top of each interval
      #1;
      xv = longint'($signed(x)); yv = longint'(y);
      seen[y[WX-1 -: 4]]++;
      ky = (yv * k32[y[WX-1 -: 4]]) >>> 5;
      kx = (xv * k32[y[WX-1 -: 4]]) >>> 5;
      dsum = 0;
      for (int i = 1; i <= N - 1; i++)
        dsum = dsum * 4 + longint'(x_sd[i].p) + longint'(x_sd[i].pp) - 2 * longint'(x_sd[i].m2);
      ysum = one;
      for (int i = 2; i <= N - 1; i++) ysum = ysum + (longint'(y_dig[i]) <<< (2 * (N - 1 - i)));
      checks += 5;
      if (longint'(ys) != ky) begin failures++; $display("FAIL y=%h ys=%h want %h", y, ys, ky); end
      if (longint'($signed(xs)) != kx) begin failures++; $display("FAIL x=%h xs=%h want %0d", x, xs, kx); end
      if (longint'(ys) < one || 8 * longint'(ys) >= 9 * one) begin
        failures++; $display("FAIL scaled divisor out of range ys=%h", ys);
      end
      if (dsum != kx) begin failures++; $display("FAIL dividend digits %0d want %0d", dsum, kx); end
      if (ysum != ky) begin failures++; $display("FAIL divisor digits %0d want %0d", ysum, ky); end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL index %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
